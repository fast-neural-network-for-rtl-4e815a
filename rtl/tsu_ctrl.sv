// tsu_ctrl -- sequencer of the synthesis network. The PE array holds one
// layer at a time, so the controller walks the layers:
//   operative pass  : layers 1, 2, ..., m    (m = log2(N)-1), writing y
//   correction pass : layers m, m-1, ..., 1  (reverse order), writing the
//                     updated weights, the output-layer errors (layer m)
//                     and the errors sent back to layer-1 (layers > 1)
// Each layer takes STEPS = ceil(N/(4K)) clocks, one per group of K POs.
//
// Interface: a one-clock `start` in IDLE begins a run; `train` chosen at the
// same clock adds the correction pass after the operative pass (one training
// iteration); otherwise the run is the operative pass alone (the network
// computes the transform). `busy` is high during the run and `done` pulses
// for one clock after its last step. Timing: with start high at clock edge
// 0, the steps occupy edges 1 .. m*STEPS (plus m*STEPS more when training)
// and done is high right after the last of them. `start` while busy is
// ignored. The layer order of both passes follows the method; the
// handshake is this design's choice.
module tsu_ctrl
  import tsu_pkg::*;
#(
  parameter int N = 16,
  parameter int K = N / 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 train,
  output logic                 busy,
  output logic                 done,
  output pe_mode_e             mode,
  output logic [$clog2(N)-1:0] stage,      // current layer 1 .. m
  output logic [$clog2(N)-1:0] step,       // PO group within the layer
  output logic                 out_layer,  // correction of layer m
  output logic                 we_y,       // write y of current layer
  output logic                 we_corr,    // write weights of current layer
  output logic                 we_prev_d   // write delta of layer stage-1
);
  localparam int LG    = $clog2(N);
  localparam int M     = LG - 1;
  localparam int STEPS = (N / 4 + K - 1) / K;   // ceil(N/(4K))

  typedef enum logic [1:0] {S_IDLE, S_OPER, S_CORR} state_e;

  state_e state;
  logic   train_q;
  logic   last_step;

  assign last_step = (int'(step) == STEPS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      stage   <= '0;
      step    <= '0;
      train_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_OPER;
          stage   <= LG'(1);
          step    <= '0;
          train_q <= train;
        end
        S_OPER: begin
          step <= last_step ? '0 : step + 1'b1;
          if (last_step) begin
            if (int'(stage) == M) begin
              if (train_q) state <= S_CORR;       // stage stays at m
              else begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end else stage <= stage + 1'b1;
          end
        end
        S_CORR: begin
          step <= last_step ? '0 : step + 1'b1;
          if (last_step) begin
            if (int'(stage) == 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else stage <= stage - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    mode      = (state == S_CORR) ? MODE_CORR : MODE_OPER;
    out_layer = (state == S_CORR) && (int'(stage) == M);
    we_y      = (state == S_OPER);
    we_corr   = (state == S_CORR);
    we_prev_d = (state == S_CORR) && (int'(stage) > 1);
  end

  // The run visits only layers that exist.
  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(stage) >= 1 && int'(stage) <= M && int'(step) < STEPS));

endmodule
