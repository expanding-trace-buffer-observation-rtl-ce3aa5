// mode_ctrl: session sequencing and observation-window counting (Mode_Ctrl).
//
// The host selects a mode and pulses `start`. The controller latches the mode,
// pulses `clear` to the phase blocks, stays ARM_CYC clocks in an arming phase
// (session 3 uses it to fetch its first tag word) and then runs, with
// `running` high. While running it counts qualified cycles (data_valid high):
// the observation window is qualified cycles win_start to win_start+win_len-1,
// and `sample` marks each qualified cycle inside it, with win_idx its index in
// the window. Counting only qualified cycles lets the window follow a trace
// trigger that is not active every clock. The session ends at the last window
// cycle (win_len != 0) or on `stop`; the controller then drains for DRAIN
// clocks so that pipelined writes finish, pulses `finish` in the last of them
// and sits in DONE until the next start. A start is ignored while busy.
// Mode selection of three session types follows the method; the arming and
// draining phases, the qualified-cycle window and `stop` are this design's
// choice.
module mode_ctrl import dbg_pkg::*; #(
  parameter int unsigned ARM_CYC = 3,
  parameter int unsigned DRAIN   = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode_sel,
  input  logic  start,
  input  logic  stop,
  input  logic  data_valid,
  input  cnt_t  win_start,
  input  cnt_t  win_len,
  output mode_e mode,
  output logic  clear,
  output logic  arming,
  output logic  running,
  output logic  finish,
  output logic  busy,
  output logic  done,
  output logic  sample,
  output cnt_t  win_idx,
  output cnt_t  cycle_count
);

  typedef enum logic [2:0] {S_IDLE, S_ARM, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e state;
  cnt_t   tcnt;
  logic   in_win, last;

  assign arming  = (state == S_ARM);
  assign running = (state == S_RUN);
  assign busy    = arming || running || (state == S_DRAIN);
  assign done    = (state == S_DONE);
  assign clear   = arming && (tcnt == 0);
  assign finish  = (state == S_DRAIN) && (tcnt == cnt_t'(DRAIN - 1));

  assign win_idx = cycle_count - win_start;
  assign in_win  = (cycle_count >= win_start) && ((win_len == 0) || (win_idx < win_len));
  assign sample  = running && data_valid && in_win;
  assign last    = sample && (win_len != 0) && (win_idx == win_len - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      mode        <= MODE_IDLE;
      tcnt        <= '0;
      cycle_count <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start && (mode_sel != MODE_IDLE)) begin
            state       <= S_ARM;
            mode        <= mode_sel;
            tcnt        <= '0;
            cycle_count <= '0;
          end
        end
        S_ARM: begin
          if (tcnt == cnt_t'(ARM_CYC - 1)) begin
            state <= S_RUN;
            tcnt  <= '0;
          end else begin
            tcnt <= tcnt + 1;
          end
        end
        S_RUN: begin
          if (data_valid) cycle_count <= cycle_count + 1;
          if (last || stop) begin
            state <= S_DRAIN;
            tcnt  <= '0;
          end
        end
        S_DRAIN: begin
          if (finish) state <= S_DONE;
          else        tcnt  <= tcnt + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_clear_once : assert property (@(posedge clk) disable iff (rst_n == 1'b0)
    clear |=> !clear);
  a_sample_only_running : assert property (@(posedge clk) disable iff (rst_n == 1'b0)
    sample |-> running);

endmodule
