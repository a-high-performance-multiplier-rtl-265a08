// tb_hmp_serial_mult: multiplies random and corner-case signed operands in
// a 16-bit and a 32-bit serial/parallel multiplier, gathers the 2N product
// bits from the serial output and compares them with the product computed
// here, and checks that clocks without shift do not disturb the sequence.
module tb_hmp_serial_mult;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [15:0] xa, ya; logic [31:0] xb, yb; logic pa, pb;
  int checks = 0, failures = 0;
  hmp_serial_mult #(.N(16)) u16 (.clk, .rst_n, .load, .shift, .mcand(xa), .mplr(ya), .prod_bit(pa));
  hmp_serial_mult #(.N(32)) u32 (.clk, .rst_n, .load, .shift, .mcand(xb), .mplr(yb), .prod_bit(pb));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] ga; logic [63:0] gb; logic signed [31:0] ea; logic signed [63:0] eb;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      case (i)
        0: begin xa = 16'h8000; ya = 16'h8000; xb = 32'h8000_0000; yb = 32'h8000_0000; end
        1: begin xa = 16'h7FFF; ya = 16'h8000; xb = 32'h7FFF_FFFF; yb = 32'h8000_0000; end
        2: begin xa = 16'hFFFF; ya = 16'hFFFF; xb = 32'hFFFF_FFFF; yb = 32'h0000_0001; end
        3: begin xa = 16'h0000; ya = 16'h1234; xb = 32'h0; yb = 32'hFFFF_FFFF; end
        default: begin xa = 16'($urandom); ya = 16'($urandom); xb = $urandom; yb = $urandom; end
      endcase
      ea = signed'(xa) * signed'(ya);
      eb = 64'(signed'(xb)) * 64'(signed'(yb));
      load = 1; @(negedge clk); load = 0;
      ga = 0; gb = 0;
      for (int k = 0; k < 64; k++) begin
        if ($urandom_range(0, 4) == 0) begin shift = 0; @(negedge clk); end
        shift = 1;
        if (k < 32) ga[k] = pa;
        gb[k] = pb;
        @(negedge clk);
      end
      shift = 0;
      checks += 2;
      if (ga !== ea) begin failures++; $display("FAIL16 %h*%h=%h want %h", xa, ya, ga, ea); end
      if (gb !== eb) begin failures++; $display("FAIL32 %h*%h=%h want %h", xb, yb, gb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
