// tb_hmp_serial_mux: all combinations of source select, accumulator clear
// and the four input bits, checked against the selection rule.
module tb_hmp_serial_mux;
  import hmp_pkg::*;
  src_e src; logic acc_zero, sprod, dprod, acc_out, round_pulse, a_bit, b_bit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  hmp_serial_mux dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 128; i++) begin
      logic ea, eb;
      src = src_e'(i[1:0]); acc_zero = i[2]; sprod = i[3]; dprod = i[4]; acc_out = i[5]; round_pulse = i[6];
      #1;
      ea = (i[1:0] == 1) ? i[3] : (i[1:0] == 2) ? i[4] : (i[1:0] == 3) ? i[6] : 1'b0;
      eb = i[2] ? 1'b0 : i[5];
      checks++;
      if (a_bit !== ea || b_bit !== eb) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
