// rect_controller: the finite state machine of the rectangular decoder.
//
// A test session starts with start (ST_IDLE -> ST_FLAG). Before it, with
// cfg_preload set, every control word offered on the ctl handshake is written to
// the RAM at consecutive addresses: the whole test set is preloaded.
// Each test cube then takes cfg_cube_len + 1 slices from the linear decompressor:
//   ST_FLAG   one extra slice whose bit 0 says whether the cube starts a new
//             cluster. No scan shift. A cube of the same cluster restarts at the
//             cluster's first rectangle; a new cluster either moves on to the next
//             words of a preloaded RAM or, without preload, goes to ST_LOAD.
//   ST_LOAD   incremental loading: control words are accepted on the ctl
//             handshake and written from address 0 until their widths add up to
//             the cube length, then the first word goes to the control register.
//             The decompressor is stalled (lin_ready low).
//   ST_SHIFT  every slice is shifted into the chains (scan_en); the width counter
//             counts it, and on a rectangle's last slice the next word is read
//             into the control register, so rectangles follow each other without
//             a gap. After cfg_cube_len slices the next cube's ST_FLAG follows.
// So a cube costs exactly one cycle more than its scan slices when the
// decompressor never stalls, as the scheme requires for continuous-flow
// decompression. The flag cycle, the restart/advance of the pointer and
// incremental versus preloaded RAM follow the scheme; the handshakes, the
// self-delimiting load (by summing widths), the choice of bit 0 for the flag and
// the sticky overflow flag are this design's. overflow is set when more words
// arrive than the RAM holds: preloaded words beyond it are dropped, and an
// incrementally loaded cluster that does not fit overwrites the last address.
// Asynchronous active-low reset.
module rect_controller
  import rect_pkg::*;
#(
  parameter int unsigned DEPTH  = rect_pkg::DEPTH_D,
  parameter int unsigned W_BITS = rect_pkg::W_BITS_D,
  parameter int unsigned LEN_W  = rect_pkg::LEN_W_D,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration and session control
  input  logic              start,
  input  logic              cfg_preload,
  input  logic [LEN_W-1:0]  cfg_cube_len,
  // linear decompressor slice handshake (only the flag bit is seen here)
  input  logic              lin_valid,
  input  logic              lin_flag,
  output logic              lin_ready,
  // control word handshake (only the width field is seen here)
  input  logic              ctl_valid,
  input  logic [W_BITS-1:0] ctl_width,
  output logic              ctl_ready,
  // RAM write port
  output logic              ram_we,
  output logic [AW-1:0]     ram_waddr,
  // address pointer, control register, width counter
  output ptr_op_e           ptr_op,
  output logic              reg_load,
  output logic              reg_from_ctl,
  output logic              wc_clr,
  output logic              wc_inc,
  input  logic              wc_last,
  // scan side and status
  output logic              scan_en,
  output logic              cube_done,
  output logic              new_cluster,
  output logic              overflow,
  output ctrl_state_e       state
);

  ctrl_state_e      state_d;
  logic [AW-1:0]    wptr, wptr_d;
  logic [LEN_W:0]   wsum, wsum_d;      // sum of widths loaded for this cluster
  logic [LEN_W-1:0] slice, slice_d;    // slices of the cube already shifted
  logic             ovf_d;
  logic             wfull, wfull_d;   // preload filled the last word
  logic             lin_fire, ctl_fire, ram_full, load_done, cube_last;

  assign lin_fire  = lin_valid & lin_ready;
  assign ctl_fire  = ctl_valid & ctl_ready;
  assign ram_full  = (32'(wptr) == DEPTH - 1);
  assign load_done = (wsum + (LEN_W+1)'(ctl_width)) >= (LEN_W+1)'(cfg_cube_len);
  assign cube_last = (slice + 1'b1) == cfg_cube_len;
  assign ram_waddr = wptr;

  always_comb begin
    state_d      = state;
    wptr_d       = wptr;
    wsum_d       = wsum;
    slice_d      = slice;
    ovf_d        = overflow;
    wfull_d      = wfull;
    lin_ready    = 1'b0;
    ctl_ready    = 1'b0;
    ram_we       = 1'b0;
    ptr_op       = PTR_HOLD;
    reg_load     = 1'b0;
    reg_from_ctl = 1'b0;
    wc_clr       = 1'b0;
    wc_inc       = 1'b0;
    scan_en      = 1'b0;
    cube_done    = 1'b0;
    new_cluster  = 1'b0;

    unique case (state)
      ST_IDLE: begin
        ctl_ready = cfg_preload;
        if (ctl_fire) begin
          if (wfull) begin
            ovf_d = 1'b1;
          end else begin
            ram_we = 1'b1;
            if (ram_full) wfull_d = 1'b1;
            else          wptr_d  = wptr + 1'b1;
          end
        end
        if (start) begin
          state_d = ST_FLAG;
          ptr_op  = PTR_CLEAR;
        end
      end

      ST_FLAG: begin
        lin_ready = 1'b1;
        if (lin_fire) begin
          slice_d = '0;
          wc_clr  = 1'b1;
          if (!lin_flag) begin
            ptr_op   = PTR_RESTART;
            reg_load = 1'b1;
            state_d  = ST_SHIFT;
          end else begin
            new_cluster = 1'b1;
            if (cfg_preload) begin
              ptr_op   = PTR_NEWCL;
              reg_load = 1'b1;
              state_d  = ST_SHIFT;
            end else begin
              wptr_d  = '0;
              wsum_d  = '0;
              state_d = ST_LOAD;
            end
          end
        end
      end

      ST_LOAD: begin
        ctl_ready = 1'b1;
        if (ctl_fire) begin
          ram_we = 1'b1;
          wsum_d = wsum + (LEN_W+1)'(ctl_width);
          if (load_done) begin
            ptr_op       = PTR_FIRST;
            reg_load     = 1'b1;
            reg_from_ctl = (wptr == '0);
            state_d      = ST_SHIFT;
          end else if (ram_full) begin
            ovf_d = 1'b1;
          end else begin
            wptr_d = wptr + 1'b1;
          end
        end
      end

      ST_SHIFT: begin
        lin_ready = 1'b1;
        if (lin_fire) begin
          scan_en = 1'b1;
          wc_inc  = 1'b1;
          slice_d = slice + 1'b1;
          if (cube_last) begin
            cube_done = 1'b1;
            wc_clr    = 1'b1;
            state_d   = ST_FLAG;
          end else if (wc_last) begin
            ptr_op   = PTR_NEXT;
            reg_load = 1'b1;
          end
        end
      end

      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      wptr     <= '0;
      wsum     <= '0;
      slice    <= '0;
      overflow <= 1'b0;
      wfull    <= 1'b0;
    end else begin
      state    <= state_d;
      wptr     <= wptr_d;
      wsum     <= wsum_d;
      slice    <= slice_d;
      overflow <= ovf_d;
      wfull    <= wfull_d;
    end
  end

  // The rectangles of a cluster tile the cube exactly: the cube's last slice is
  // also the last slice of a rectangle.
  a_tiling: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_SHIFT && lin_fire && cube_last) |-> wc_last)
    else $error("rectangles do not end with the test cube");

  // Control word handshake: a word offered is held until it is taken.
  a_ctl_hold: assume property (@(posedge clk) disable iff (!rst_n)
    (ctl_valid && !ctl_ready && state == ST_LOAD) |=> ctl_valid);

endmodule
