// rect_decoder: rectangular decoder placed between a linear decompressor and the
// scan chains of a core.
//
// The test set is encoded as rectangles: for a cluster of correlated test cubes,
// the scan slices of every cube are cut the same way into runs of slices, and in
// each run a set of chains (selected K_SHARE at a time by a chain select mask) is
// filled with one constant fill value instead of being produced by the linear
// decompressor. The decompressor therefore has to produce far fewer specified
// bits. This module decodes that format for any test set: a controller FSM
// (rect_controller), a RAM of control words (rect_ctrl_ram), a RAM address
// pointer (ram_addr_ptr), a width counter (width_counter), the rectangular
// control register (rect_ctrl_reg) and one multiplexer per chain
// (chain_mux).
//
// Interface and timing:
//   lin_valid/lin_ready/lin_slice  scan slices from the linear decompressor. Per
//       test cube, one flag slice (bit 0 = 1: the cube starts a new cluster)
//       followed by cfg_cube_len data slices; each data slice leaves the decoder
//       on scan_in with scan_en high in the same cycle it is taken.
//   ctl_valid/ctl_ready/ctl_data   control words {width, mask, fill}, from the
//       tester or the decompressor; taken before start when cfg_preload is set
//       (whole test set), otherwise at the start of every new cluster.
//   start                          begins the test session (pulse).
// With a stall-free source, a cube takes cfg_cube_len + 1 cycles.
// The split into blocks follows the decoder's block diagram; the handshakes,
// flag position, combinational RAM read and threshold value are this design's
// choices (see the sub-modules).
module rect_decoder
  import rect_pkg::*;
#(
  parameter int unsigned N_CHAINS  = rect_pkg::N_CHAINS_D,
  parameter int unsigned K_SHARE   = rect_pkg::K_SHARE_D,
  parameter int unsigned W_BITS    = rect_pkg::W_BITS_D,
  parameter int unsigned MIN_WIDTH = rect_pkg::MIN_WIDTH_D,
  parameter int unsigned DEPTH     = rect_pkg::DEPTH_D,
  parameter int unsigned LEN_W     = rect_pkg::LEN_W_D,
  localparam int unsigned C_BITS   = (N_CHAINS + K_SHARE - 1) / K_SHARE,
  localparam int unsigned WORD_W   = W_BITS + C_BITS + 1,
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                cfg_preload,
  input  logic [LEN_W-1:0]    cfg_cube_len,
  input  logic                lin_valid,
  output logic                lin_ready,
  input  logic [N_CHAINS-1:0] lin_slice,
  input  logic                ctl_valid,
  output logic                ctl_ready,
  input  logic [WORD_W-1:0]   ctl_data,
  output logic                scan_en,
  output logic [N_CHAINS-1:0] scan_in,
  output logic                cube_done,
  output logic                new_cluster,
  output logic                overflow,
  output logic                busy
);

  ptr_op_e           ptr_op;
  ctrl_state_e       state;
  logic              ram_we, reg_load, reg_from_ctl, wc_clr, wc_inc, wc_last, narrow;
  logic [AW-1:0]     ram_waddr, ram_raddr, ptr, cl_start;
  logic [WORD_W-1:0] ram_rdata, reg_d;
  logic [W_BITS-1:0] width, wc_cnt;
  logic [C_BITS-1:0] mask;
  logic              fill;

  rect_controller #(.DEPTH(DEPTH), .W_BITS(W_BITS), .LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n, .start, .cfg_preload, .cfg_cube_len,
    .lin_valid, .lin_flag(lin_slice[0]), .lin_ready,
    .ctl_valid, .ctl_width(ctl_data[WORD_W-1 -: W_BITS]), .ctl_ready,
    .ram_we, .ram_waddr, .ptr_op, .reg_load, .reg_from_ctl,
    .wc_clr, .wc_inc, .wc_last, .scan_en, .cube_done, .new_cluster, .overflow,
    .state
  );

  rect_ctrl_ram #(.DEPTH(DEPTH), .WORD_W(WORD_W)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ctl_data),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  ram_addr_ptr #(.DEPTH(DEPTH)) u_ptr (
    .clk, .rst_n, .op(ptr_op), .raddr(ram_raddr), .ptr, .cl_start
  );

  // A cluster held in a single word is taken straight from the load port.
  assign reg_d = reg_from_ctl ? ctl_data : ram_rdata;

  rect_ctrl_reg #(.W_BITS(W_BITS), .C_BITS(C_BITS)) u_reg (
    .clk, .rst_n, .load(reg_load), .d(reg_d), .width, .mask, .fill
  );

  width_counter #(.W_BITS(W_BITS)) u_wc (
    .clk, .rst_n, .clr(wc_clr), .inc(wc_inc), .width, .cnt(wc_cnt), .last(wc_last)
  );

  chain_mux #(.N_CHAINS(N_CHAINS), .K_SHARE(K_SHARE), .W_BITS(W_BITS),
              .MIN_WIDTH(MIN_WIDTH)) u_mux (
    .lin_slice, .width, .mask, .fill, .scan_in, .narrow
  );

  assign busy = (state != ST_IDLE);

  // A rectangle being decoded has a non-zero width.
  a_width: assert property (@(posedge clk) disable iff (!rst_n)
    scan_en |-> width != '0)
    else $error("rectangle of width 0");

endmodule
