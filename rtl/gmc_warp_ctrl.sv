// gmc_warp_ctrl: warping controller with cascaded scheduling.
//
// Schedules the loading of reference rows into the eight-row local memory
// and the warping of the Y, Cb and Cr blocks of one macroblock. The
// reference regions of the three blocks are loaded back to back as one
// stream of rows numbered by a sequence number; block k's rows start at
// base[k] = rows of the blocks before it. Two rules keep both sides
// running at once:
//  * Warping may start a row of the current block only when every
//    reference row that row touches is in the local memory. The rows
//    touched lie between floor(Y0 + row_lo_off) and floor(Y0 + row_hi_off)+1
//    where Y0 is the row's first warped y'; row_hi_off/row_lo_off are the
//    spread of y' along a row from macroblock setting. Otherwise the
//    address generator stalls (counted in warp_stall).
//  * A reference row may be requested only if its buffer slot holds a row
//    no longer needed: seq < min_needed + 8, where min_needed is the first
//    row touched by the row being warped. Rows above it are discarded.
//    Otherwise loading waits (counted in load_wait).
// So once the luma region is loaded, the chroma rows fill the slots freed
// by finished luma rows while luma warping goes on (cascade counts the
// cycles in which a chroma row is requested while luma is still warped).
//
// Interface: 'start' begins a macroblock with set[] from macroblock
// setting; set[0] must be valid at start, set[1] and set[2] from the end
// of the Y region load on (base[2] is formed when the Cb block starts).
// 'done' pulses when the last interpolated pixel has left.
//
// Cascaded scheduling and discarding rows no longer needed follow the
// published design; the two exact rules and the status outputs are this
// design's own formulation.
module gmc_warp_ctrl
  import gmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  blk_set_t    set [3],
  // warping address generator
  output logic        wag_load,
  output logic [1:0]  wag_blk,
  output logic        wag_en,
  output logic [11:0] wag_base,
  input  logic        wag_active,
  input  logic [3:0]  wag_col,
  input  coord_t      wag_y,
  input  logic        wag_last,
  // loading side
  input  logic        ld_valid,
  input  logic [11:0] ld_seq,
  input  logic [1:0]  ld_comp,
  input  logic        fifo_full,
  input  logic        ext_gnt,
  output logic        ext_req,
  output logic        ld_adv,
  input  logic        row_done,
  // status
  output logic        busy,
  output logic        done,
  output logic        warp_stall,
  output logic        load_wait,
  output logic        cascade
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [11:0] base [3];
  logic [11:0] rows_loaded, min_needed;
  logic [1:0]  drain;
  blk_set_t    cs;
  logic signed [15:0] lo_row, hi_row;
  logic [11:0] lo_seq, hi_seq;
  logic        row_ok, slot_free;

  always_comb begin
    cs     = set[wag_blk];
    lo_row = coord_int(wag_y + cs.row_lo_off) - cs.y_lo;
    hi_row = coord_int(wag_y + cs.row_hi_off) + 16'sd1 - cs.y_lo;
    lo_seq = 12'(lo_row) + base[wag_blk];
    hi_seq = 12'(hi_row) + base[wag_blk];
    row_ok = (wag_col != 4'd0) || (hi_seq < rows_loaded);
    wag_en = (state == S_RUN) && wag_active && row_ok;
    slot_free = (ld_seq < min_needed + 12'(LM_ROWS));
    ext_req   = busy && ld_valid && !fifo_full && slot_free;
    ld_adv    = ext_req && ext_gnt;
    wag_base  = base[wag_blk];
    warp_stall = (state == S_RUN) && wag_active && !row_ok;
    load_wait  = busy && ld_valid && !fifo_full && !slot_free;
    cascade    = ld_adv && (ld_comp != 2'd0) && (wag_blk == 2'd0) && (state == S_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      busy        <= 1'b0;
      done        <= 1'b0;
      wag_load    <= 1'b0;
      wag_blk     <= '0;
      rows_loaded <= '0;
      min_needed  <= '0;
      drain       <= '0;
      for (int i = 0; i < 3; i++) base[i] <= '0;
    end else begin
      done     <= 1'b0;
      wag_load <= 1'b0;
      if (row_done) rows_loaded <= rows_loaded + 12'd1;
      unique case (state)
        S_IDLE: if (start) begin
          busy        <= 1'b1;
          base[0]     <= '0;
          base[1]     <= 12'(set[0].nrows);
          rows_loaded <= '0;
          min_needed  <= '0;
          wag_blk     <= '0;
          wag_load    <= 1'b1;
          state       <= S_LOAD;
        end
        S_LOAD: state <= S_RUN;
        S_RUN: begin
          // Rows above the first row touched by the current row are free.
          if (wag_active && wag_col == 4'd0 && lo_seq > min_needed)
            min_needed <= lo_seq;
          if (wag_en && wag_last) begin
            if (wag_blk == 2'd2) begin
              state <= S_DRAIN;
              drain <= '0;
            end else begin
              wag_blk  <= wag_blk + 2'd1;
              wag_load <= 1'b1;
              if (wag_blk == 2'd0) base[2] <= base[1] + 12'(set[1].nrows);
              state    <= S_LOAD;
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 2'd1;
          if (drain == 2'd3) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
