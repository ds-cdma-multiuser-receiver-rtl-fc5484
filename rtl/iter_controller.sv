// iter_controller -- sequencing and iteration counter of the demodulator.
//
// Once a frame is in the received-chip memory (`go`), the controller runs
// `num_iter` iterations (0 is taken as 1). Each iteration is
//   chip pass:      `chip_start`, then LN cycles of `chip_valid` with the chip
//                   index `chip_idx` (0 .. LN-1), then DRAIN idle cycles;
//   partition pass: `part_start`, then LM cycles of `part_valid`, then DRAIN
//                   idle cycles.
// `iter` counts the iterations, `first_iter` marks the first one (its chip
// pass has no estimates to cancel) and `last_iter` the final one. `done`
// pulses for one cycle after the last drain; `busy` is high from `go` to then.
// DRAIN must cover the pipeline latency from the last valid of a pass to its
// last memory write. The use of an iteration counter follows the published
// design; the two-pass schedule and the drain gaps are this design's own.
module iter_controller #(
  parameter int unsigned LN    = 4096,
  parameter int unsigned LM    = 256,
  parameter int unsigned DRAIN = 32,
  parameter int unsigned IW    = 4,
  localparam int unsigned CW   = $clog2(LN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [IW-1:0] num_iter,
  output logic          chip_start,
  output logic          chip_valid,
  output logic [CW-1:0] chip_idx,
  output logic          part_start,
  output logic          part_valid,
  output logic [IW-1:0] iter,
  output logic          first_iter,
  output logic          last_iter,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {
    S_IDLE, S_CHIP_START, S_CHIP, S_CHIP_DRAIN, S_PART_START, S_PART, S_PART_DRAIN
  } state_t;

  localparam int unsigned TW = $clog2(LN > DRAIN ? LN : DRAIN + 1) + 1;

  state_t        state;
  logic [TW-1:0] cnt;
  logic [IW-1:0] iters;

  assign chip_start = (state == S_CHIP_START);
  assign chip_valid = (state == S_CHIP);
  assign chip_idx   = cnt[CW-1:0];
  assign part_start = (state == S_PART_START);
  assign part_valid = (state == S_PART);
  assign first_iter = (iter == '0);
  assign last_iter  = (iter + 1'b1 >= iters);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      iter  <= '0;
      iters <= IW'(1);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          iter  <= '0;
          iters <= (num_iter == '0) ? IW'(1) : num_iter;
          state <= S_CHIP_START;
        end
        S_CHIP_START: begin
          cnt   <= '0;
          state <= S_CHIP;
        end
        S_CHIP: begin
          if (cnt == TW'(LN - 1)) begin
            cnt   <= '0;
            state <= S_CHIP_DRAIN;
          end else cnt <= cnt + 1'b1;
        end
        S_CHIP_DRAIN: begin
          if (cnt == TW'(DRAIN - 1)) begin
            cnt   <= '0;
            state <= S_PART_START;
          end else cnt <= cnt + 1'b1;
        end
        S_PART_START: begin
          cnt   <= '0;
          state <= S_PART;
        end
        S_PART: begin
          if (cnt == TW'(LM - 1)) begin
            cnt   <= '0;
            state <= S_PART_DRAIN;
          end else cnt <= cnt + 1'b1;
        end
        S_PART_DRAIN: begin
          if (cnt == TW'(DRAIN - 1)) begin
            cnt <= '0;
            if (last_iter) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              iter  <= iter + 1'b1;
              state <= S_CHIP_START;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
