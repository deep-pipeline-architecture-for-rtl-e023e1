// tb_sadc_ctrl1: drives SADC-Ctrl 1 with PU1 jobs and checks the read
// sequence and tags it produces.
//  Phase 1: 200 jobs arrive every 32 cycles, the rate of the fetch; the
//  SADC stream must be continuous (one job per 32 cycles, no gaps).
//  Phase 2: jobs arrive at random (never more than two waiting) and the
//  first-of-i jobs (D_i against R^g_i) are held until sl_done, which the
//  testbench raises at random.
// For every job: 32 valid cycles in order of arrival; cycle n reads RAM 4-R
// word n, RAM D word {bank, n mod 8}, mu(R_{n/8}) and mu(D) of the bank one
// cycle before; first/last mark n mod 8 = 0/7; tag = (kind, k, i, p=n/8, j).
module tb_sadc_ctrl1;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0, job_valid = 0, sl_done = 1;
  pu1_job_t job;
  logic busy, idle, q_empty, mud_sel, sadc_valid, sadc_first, sadc_last;
  logic [4:0] r4_raddr;
  logic [3:0] d_raddr;
  logic [1:0] mur_sel;
  sadc_tag_t sadc_tag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sadc_ctrl1 dut (.*);

  pu1_job_t expq[$];
  pu1_job_t curj;
  int n = 0, jobs_done = 0, outstanding = 0;
  longint cyc = 0, t_first = -1, t_last = -1;
  logic [4:0] p_r4;
  logic [3:0] p_d;
  logic [1:0] p_mur;
  logic p_mud;
  logic sl_hist[3];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    p_r4 <= r4_raddr; p_d <= d_raddr; p_mur <= mur_sel; p_mud <= mud_sel;
    sl_hist[2] <= sl_hist[1]; sl_hist[1] <= sl_hist[0]; sl_hist[0] <= sl_done;
    if (rst_n) begin
      // q_empty: no job waiting; idle: nothing waiting or running
      checks++;
      if ((idle && !q_empty) || (!busy && !q_empty && !sl_done && !expq[0].first_of_i)) failures++;
    end
    if (sadc_valid) begin
      if (n == 0) begin
        curj = expq.pop_front();
        checks++;
        if (curj.first_of_i && !sl_hist[1]) begin failures++; $display("RG job started before sl_done"); end
        if (t_first < 0) t_first = cyc;
      end
      checks++;
      if (p_r4 != 5'(n) || p_d != {curj.bank, 3'(n % 8)} || p_mur != 2'(n / 8) || p_mud != curj.bank ||
          sadc_first != (n % 8 == 0) || sadc_last != (n % 8 == 7) ||
          sadc_tag.kind != (curj.first_of_i ? K_RG : K_DG) || sadc_tag.k != curj.k || sadc_tag.rng != curj.i ||
          sadc_tag.dom != curj.j || sadc_tag.p != 2'(n / 8)) begin
        failures++;
        if (failures < 5) $display("job %0d n %0d wrong", jobs_done, n);
      end
      n = (n + 1) % 32;
      if (n == 0) begin jobs_done++; outstanding--; t_last = cyc; end
    end
  end

  task automatic push(bit first);
    pu1_job_t jb;
    jb.bank = 1'($urandom); jb.first_of_i = first;
    jb.k = 6'($urandom); jb.i = 6'($urandom); jb.j = 6'($urandom);
    job = jb; job_valid = 1;
    expq.push_back(jb);
    outstanding++;
    @(negedge clk) job_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: fetch rate
    for (int b = 0; b < 200; b++) begin
      push(b % 20 == 0);
      repeat (31) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (jobs_done != 200 || t_last - t_first != 200 * 32 - 1) begin
      failures++; $display("phase 1: %0d jobs in %0d cycles", jobs_done, t_last - t_first + 1);
    end
    checks++;
    if (!idle) failures++;
    // phase 2: random arrivals, sl_done gating
    fork
      begin
        for (int b = 0; b < 300; b++) begin
          while (outstanding >= 2 || $urandom_range(0, 3) == 0) @(negedge clk);
          push($urandom_range(0, 3) == 0);
        end
      end
      begin
        repeat (300 * 40) begin
          @(negedge clk) sl_done = $urandom_range(0, 2) != 0;
        end
      end
    join_any
    sl_done = 1;
    wait (outstanding == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (jobs_done != 500 || !idle || expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
