// rf_parallel_ctrl: sequencer of the pixel-parallel resistive-fuse network.
//
// On `start` it runs the published update schedule:
//   phase A (clka high): R iterations of {step 0, step 1}
//   phase B (clkb high): R iterations of {step 0, step 1}
//   phase C (clkc high): R iterations of {step 0, step 1}
// `step` 0 is the input (sigma) term, 1 the neighbour (G) term; `en` is high
// in each of the 6R cycles of the run, and `done` pulses in the cycle after
// the last step. `start` is ignored while busy. While idle the one-hot phase
// lines keep the last phase (C after a run, A after reset), so that the
// blown-fuse flags of the cells can be read against the final table. Mapping each CLK phase to one system clock cycle is
// this design's choice.
module rf_parallel_ctrl
  import rf_pkg::*;
#(
  parameter int unsigned R  = R_ITER,
  localparam int unsigned RW = $clog2(R + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en,
  output logic step,
  output logic clka,
  output logic clkb,
  output logic clkc,
  output logic busy,
  output logic done
);

  phase_e        phase;
  logic [RW-1:0] iter;

  assign en   = busy;
  assign clka = (phase == PH_A);
  assign clkb = (phase == PH_B);
  assign clkc = (phase == PH_C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      step  <= 1'b0;
      iter  <= '0;
      phase <= PH_A;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          step  <= 1'b0;
          iter  <= '0;
          phase <= PH_A;
        end
      end else if (!step) begin
        step <= 1'b1;
      end else begin
        step <= 1'b0;
        if (32'(iter) == R - 1) begin
          iter <= '0;
          if (phase == PH_C) begin
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            phase <= phase_e'(phase + 2'd1);
          end
        end else begin
          iter <= iter + 1'b1;
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot({clka, clkb, clkc}));

endmodule
