// tb_rect_controller: self-checking test of the decoder's controller FSM.
// The testbench stands in for the width counter (it drives wc_last from the
// rectangle widths it knows) and checks, cycle by cycle, the handshakes, the
// RAM writes, the pointer operations, the control register loads and the scan
// enable. Covered: incremental loading of clusters (including a one-word
// cluster), repeated cubes of a cluster, a stalling decompressor, preloading
// with RAM overflow, and the cube rate of cube_len + 1 cycles without stalls.
module tb_rect_controller;
  import rect_pkg::*;
  localparam int unsigned DEPTH = 8, W_BITS = 4, LEN_W = 8, AW = 3, L = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, cfg_preload = 1'b0;
  logic [LEN_W-1:0] cfg_cube_len = LEN_W'(L);
  logic lin_valid = 1'b0, lin_flag = 1'b0, lin_ready;
  logic ctl_valid = 1'b0, ctl_ready;
  logic [W_BITS-1:0] ctl_width = '0;
  logic ram_we, reg_load, reg_from_ctl, wc_clr, wc_inc, wc_last = 1'b0;
  logic [AW-1:0] ram_waddr;
  ptr_op_e ptr_op;
  logic scan_en, cube_done, new_cluster, overflow;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int cycles = 0;

  rect_controller #(.DEPTH(DEPTH), .W_BITS(W_BITS), .LEN_W(LEN_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s (state %s)", $time, what, state.name());
    end
  endtask

  // Load one cluster's widths on the control port (in ST_LOAD).
  task automatic load_cluster(input int widths[$], input bit stall);
    for (int i = 0; i < widths.size(); i++) begin
      @(negedge clk);
      ctl_valid = 1'b0;
      if (stall) repeat ($urandom_range(2)) begin
        #1; chk(!ram_we, "RAM write without valid");
        @(negedge clk);
      end
      ctl_valid = 1'b1;
      ctl_width = W_BITS'(widths[i]);
      #1;
      chk(ctl_ready && state == ST_LOAD, "control word not accepted in ST_LOAD");
      chk(ram_we && ram_waddr == AW'(i), "RAM write address");
      chk(!lin_ready && !scan_en, "decompressor not stalled during load");
      if (i == widths.size() - 1)
        chk(reg_load && ptr_op == PTR_FIRST && reg_from_ctl == (i == 0),
            "end of load: first word to control register");
      else
        chk(!reg_load && ptr_op == PTR_HOLD, "load before last word");
    end
    @(negedge clk);
    ctl_valid = 1'b0;
  endtask

  // Flag slice, optional load, then the cube's slices.
  task automatic run_cube(input bit flag, input int widths[$], input bit stall,
                          input bit preload);
    int r, s, n;
    lin_valid = 1'b1; lin_flag = flag;
    #1;
    chk(state == ST_FLAG && lin_ready && !scan_en, "flag cycle");
    if (!flag)
      chk(reg_load && ptr_op == PTR_RESTART, "same cluster: restart pointer");
    else if (preload)
      chk(reg_load && ptr_op == PTR_NEWCL && new_cluster, "preloaded new cluster: advance");
    else
      chk(!reg_load && new_cluster, "incremental new cluster: no register load yet");
    @(negedge clk);
    lin_valid = 1'b0;
    if (flag && !preload) begin
      #1; chk(state == ST_LOAD, "ST_LOAD after new-cluster flag");
      load_cluster(widths, stall);
    end
    r = 0; s = 0; n = 0;
    while (n < L) begin
      lin_valid = stall ? ($urandom_range(3) != 0) : 1'b1;
      wc_last   = (s == widths[r] - 1);
      #1;
      chk(lin_ready && state == ST_SHIFT, "ready during shift");
      chk(scan_en == lin_valid && wc_inc == lin_valid, "scan_en follows slice handshake");
      if (lin_valid) begin
        if (n == L - 1) begin
          chk(cube_done && !reg_load, "cube end");
        end else if (wc_last) begin
          chk(reg_load && ptr_op == PTR_NEXT && !reg_from_ctl, "next rectangle loaded");
        end else begin
          chk(!reg_load && ptr_op == PTR_HOLD && !cube_done, "inside rectangle");
        end
        n++;
        if (wc_last) begin r++; s = 0; end else s++;
      end else begin
        chk(!reg_load && !cube_done, "stalled slice");
      end
      @(negedge clk);
    end
    lin_valid = 1'b0; wc_last = 1'b0;
  endtask

  int c0, c1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 chk(state == ST_IDLE && !lin_ready && !ctl_ready, "idle after reset");
    // incremental session
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    run_cube(1'b1, '{3, 4, 3}, 1'b1, 1'b0);
    run_cube(1'b0, '{3, 4, 3}, 1'b1, 1'b0);
    run_cube(1'b1, '{10},      1'b1, 1'b0);
    run_cube(1'b0, '{10},      1'b0, 1'b0);
    run_cube(1'b1, '{2, 2, 2, 1, 3}, 1'b0, 1'b0);
    // rate: three cubes of the same cluster without stalls
    c0 = cycles;
    repeat (3) run_cube(1'b0, '{2, 2, 2, 1, 3}, 1'b0, 1'b0);
    c1 = cycles;
    chk(c1 - c0 == 3 * (L + 1), $sformatf("cube rate: %0d cycles for 3 cubes", c1 - c0));
    chk(!overflow, "no overflow in incremental session");
    // preload session with overflow
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    cfg_preload = 1'b1;
    for (int i = 0; i < DEPTH + 2; i++) begin
      ctl_valid = 1'b1; ctl_width = 4'd5;
      #1;
      chk(ctl_ready, "preload accepted in idle");
      chk(ram_we == (i < DEPTH) && (i >= DEPTH || ram_waddr == AW'(i)), "preload write");
      @(negedge clk);
      chk(overflow == (i >= DEPTH), "overflow flag");
    end
    ctl_valid = 1'b0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    start = 1'b1; @(negedge clk); start = 1'b0;
    c0 = cycles;
    run_cube(1'b1, '{5, 5}, 1'b0, 1'b1);
    run_cube(1'b0, '{5, 5}, 1'b0, 1'b1);
    run_cube(1'b1, '{4, 6}, 1'b0, 1'b1);
    c1 = cycles;
    chk(c1 - c0 == 3 * (L + 1), "preloaded cube rate");
    // incremental cluster larger than the RAM
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; cfg_preload = 1'b0;
    cfg_cube_len = LEN_W'(20);
    start = 1'b1; @(negedge clk); start = 1'b0;
    lin_valid = 1'b1; lin_flag = 1'b1; @(negedge clk); lin_valid = 1'b0;
    for (int i = 0; i < DEPTH + 1; i++) begin
      ctl_valid = 1'b1; ctl_width = 4'd1; @(negedge clk);
    end
    ctl_valid = 1'b0;
    chk(overflow && state == ST_LOAD, "incremental overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
