// gmc_controller: GMC controller.
//
// Sequences the engine. A frame start runs the global motion parameter
// generator once; the parameters then serve every macroblock of the frame.
// A macroblock start runs macroblock setting; as soon as the Y block is set
// up (ms_y_done) warping starts and loads the Y region while setting
// finishes the Cb and Cr blocks. If macroblock setting flags the Y block's
// reference region as too large for the local memory (motion beyond the
// supported range; ms_unsupported, sampled with ms_y_done), warping is
// skipped, and once setting has finished mb_error pulses with mb_done.
//
// Interface: frame_start and mb_start are pulses honoured in S_IDLE;
// frame_ready stays high once parameters exist; mb_done pulses at the end
// of a macroblock. The *_start outputs are one-cycle pulses to the units.
// mul_owner lends the shared multipliers: to the parameter generator in
// S_PARAM, to macroblock setting from its start to its done, and to
// warping otherwise. Macroblock setting ends long before the interpolation
// filter gets its first pixel, which needs two loaded reference rows.
//
// The controller's role follows the published design; its states, the
// early start of warping and the rejection of unsupported macroblocks are
// this design's own.
module gmc_controller
  import gmc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic mb_start,
  input  logic pg_done,
  input  logic ms_y_done,
  input  logic ms_done,
  input  logic ms_unsupported,
  input  logic wp_done,
  output logic pg_start,
  output logic ms_start,
  output logic wp_start,
  output logic busy,
  output logic frame_ready,
  output logic mb_done,
  output logic mb_error,
  output mul_owner_e mul_owner
);

  typedef enum logic [2:0] {S_IDLE, S_PARAM, S_SETTING, S_WARP, S_REJECT} state_e;
  state_e state;
  logic   ms_run;   // macroblock setting in progress

  assign busy = (state != S_IDLE);
  assign mul_owner = (state == S_PARAM) ? MUL_PG :
                     ms_run             ? MUL_MS : MUL_WARP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ms_run      <= 1'b0;
      pg_start    <= 1'b0;
      ms_start    <= 1'b0;
      wp_start    <= 1'b0;
      frame_ready <= 1'b0;
      mb_done     <= 1'b0;
      mb_error    <= 1'b0;
    end else begin
      pg_start <= 1'b0;
      ms_start <= 1'b0;
      wp_start <= 1'b0;
      mb_done  <= 1'b0;
      mb_error <= 1'b0;
      if (ms_done) ms_run <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (frame_start) begin
            frame_ready <= 1'b0;
            pg_start    <= 1'b1;
            state       <= S_PARAM;
          end else if (mb_start && frame_ready) begin
            ms_start <= 1'b1;
            ms_run   <= 1'b1;
            state    <= S_SETTING;
          end
        end
        S_PARAM: if (pg_done) begin
          frame_ready <= 1'b1;
          state       <= S_IDLE;
        end
        S_SETTING: if (ms_y_done) begin
          if (ms_unsupported) begin
            state <= S_REJECT;
          end else begin
            wp_start <= 1'b1;
            state    <= S_WARP;
          end
        end
        S_REJECT: if (ms_done) begin
          mb_done  <= 1'b1;
          mb_error <= 1'b1;
          state    <= S_IDLE;
        end
        S_WARP: if (wp_done) begin
          mb_done <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Warping cannot finish before setting has.
  a_setting_first: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WARP && wp_done) |-> !ms_run)
    else $error("warping finished while macroblock setting was still running");

endmodule
