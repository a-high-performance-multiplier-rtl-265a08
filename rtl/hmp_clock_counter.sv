// hmp_clock_counter: serial clock counter and clock control.
//
// Times one processor function.  After start it is busy for PRE_CYCLES
// set-up cycles (the first gives the load strobe that loads the multiplier
// and clears the adder carry), then gives count serial clocks (shift high,
// bit_idx = 0..count-1), then finishing cycles: MUL_POST for a multiply,
// SCALE_POST for a scale and round (finish marks the first of them, done
// the last busy cycle).  With the defaults a function is busy for count+6
// (multiply) or count+7 (scale) clocks, which at a 16 MHz clock gives the
// execution times of the processor: 2.38 us single and 4.38 us double
// precision multiply-accumulate, 2.44 us for a 32-bit scale by 2^0,
// 4.44 us for a 64-bit one.  That the serial clock count comes from the
// translation PROM follows the original design; the split of the overhead into
// set-up and finishing cycles is this design's choice.
module hmp_clock_counter #(
  parameter int unsigned PRE_CYCLES = 2,
  parameter int unsigned MUL_POST   = 4,
  parameter int unsigned SCALE_POST = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       is_scale,
  input  logic [6:0] count,
  output logic       busy,
  output logic       load,
  output logic       shift,
  output logic [6:0] bit_idx,
  output logic       finish,
  output logic       done
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_SHIFT, S_POST} state_e;
  state_e     st;
  logic [6:0] cnt;      // cycles left in the current phase, minus one
  logic [6:0] total;    // serial clocks of this function
  logic [3:0] post_n;   // finishing cycles of this function

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      cnt     <= '0;
      total   <= '0;
      post_n  <= '0;
      bit_idx <= '0;
      load    <= 1'b0;
    end else begin
      load <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st      <= S_PRE;
          cnt     <= 7'(PRE_CYCLES - 1);
          total   <= count;
          post_n  <= is_scale ? 4'(SCALE_POST) : 4'(MUL_POST);
          bit_idx <= '0;
          load    <= 1'b1;
        end
        S_PRE: if (cnt == 0) begin
          if (total == 0) begin
            st  <= S_POST;
            cnt <= 7'(post_n - 1);
          end else begin
            st  <= S_SHIFT;
            cnt <= total - 7'd1;
          end
        end else cnt <= cnt - 7'd1;
        S_SHIFT: begin
          bit_idx <= bit_idx + 7'd1;
          if (cnt == 0) begin
            st  <= S_POST;
            cnt <= 7'(post_n - 1);
          end else cnt <= cnt - 7'd1;
        end
        S_POST: if (cnt == 0) st <= S_IDLE;
                else          cnt <= cnt - 7'd1;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy   = (st != S_IDLE);
    shift  = (st == S_SHIFT);
    finish = (st == S_POST) && (cnt == 7'(post_n - 1));
    done   = (st == S_POST) && (cnt == 0);
  end
endmodule
