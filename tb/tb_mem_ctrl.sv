// tb_mem_ctrl: runs MemCtrl with the address generator over one sub-image.
// A model of the processors holds pu_idle low for a random time after each
// set. Checks: the fetch starts on Start; exactly 8 idle cycles separate the
// last R^b word from the first D^g word; after the last block of a set the
// fetch waits at least 8 cycles and until PU1 has started its last job
// (pu1_started); the data-bus tag is the
// address tag one cycle later with PG/SG valid set by kind; done pulses once
// at the end, after pu_idle.
module tb_mem_ctrl;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pu_idle = 1, pu1_started = 1;
  fetch_tag_t tag_a, tag_out;
  logic last_of_i, last_all, addrg_en, addrg_clr, pg_valid, sg_valid, busy, done;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mem_addr_gen #(.K_LAST(0)) u_ag (.clk, .rst_n, .clr(addrg_clr), .en(addrg_en), .addr, .tag(tag_a),
                                   .last_of_i, .last_all);
  mem_ctrl dut (.clk, .rst_n, .start, .tag_in(tag_a), .last_of_i, .last_all, .pu_idle, .pu1_started,
                .addrg_en, .addrg_clr, .tag_out, .pg_valid, .sg_valid, .busy, .done);

  longint cyc = 0, t_rb_end = -1, t_set_end = -1, t_idle = -1;
  int n_gap_ok = 0, n_drain_ok = 0, n_done = 0;
  fetch_tag_t prev_tag;
  int busy_hold = 0, start_hold = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // tag_out is last cycle's address tag
      checks++;
      if (tag_out !== prev_tag) failures++;
      checks++;
      if (pg_valid != (tag_out.valid && (tag_out.kind == K_RG || tag_out.kind == K_DG)) ||
          sg_valid != (tag_out.valid && (tag_out.kind == K_RR || tag_out.kind == K_RB))) failures++;
      prev_tag <= tag_a;
      if (tag_a.valid && tag_a.kind == K_RB && tag_a.p == 31 && !last_of_i) t_rb_end <= cyc;
      if (tag_a.valid && tag_a.kind == K_DG && tag_a.p == 0 && tag_a.j == tag_a.i + 1) begin
        checks++;
        if (cyc - t_rb_end != 9) begin failures++; $display("gap %0d", cyc - t_rb_end - 1); end
        else n_gap_ok++;
      end
      if (last_of_i) begin
        t_set_end <= cyc;
        busy_hold = $urandom_range(0, 40);
        start_hold = $urandom_range(0, busy_hold);
      end
      if (tag_a.valid && tag_a.kind == K_RG && tag_a.p == 0 && t_set_end >= 0) begin
        checks++;
        if (cyc - t_set_end < 9 || !seen_started) failures++;
        else n_drain_ok++;
      end
      if (done) begin
        n_done++;
        checks++;
        if (!pu_idle || cyc - t_set_end < 9) failures++;
      end
    end
  end

  // processor model: after each set PU1 takes a while to start its last job
  // (pu1_started) and longer to finish everything (pu_idle)
  always @(negedge clk) begin
    if (busy_hold > 0) begin pu_idle = 0; busy_hold--; end
    else pu_idle = 1;
    if (start_hold > 0) begin pu1_started = 0; start_hold--; end
    else pu1_started = 1;
  end
  // the next set may start once pu1_started was high in the cycle before
  logic seen_started = 0;
  always @(posedge clk) seen_started <= pu1_started;

  initial begin
    prev_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (addrg_en || busy) failures++;   // nothing before Start
    start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (3) @(negedge clk);
    checks++;
    if (n_done != 1 || busy || n_gap_ok != 63 || n_drain_ok != 63) begin
      failures++;
      $display("done %0d gaps %0d drains %0d", n_done, n_gap_ok, n_drain_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
