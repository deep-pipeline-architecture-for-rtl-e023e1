// sadc_ctrl1: SADC-Ctrl 1, the sequencer of processor PU1.
//
// A job is one contracted domain block D_j in a bank of RAM D, to be matched
// with the four range blocks R^g_{i,0..3} held in RAM 4-R. Jobs arrive from
// SCtrl and wait in a two-entry queue. A job runs for 32 cycles: in cycle n
// it reads RAM 4-R word n (range block n/8, row n%8) and RAM D row n%8 of
// the job's bank, and selects mu(R_{n/8}) and the bank's mu(D) for OCU1
// (mu(R)Sel). One cycle later the RAM data and OCU1's offsets reach SADC1,
// flagged by sadc_valid/first/last and tagged with (k, i, p = n/8, j).
// So one matching takes 8 cycles and a domain block 32, as in the document.
// The first job of a set (D_i, made from R^g_i) starts only after sl_done,
// when PU2 has stopped reading RAM 4-R. idle is high when no job is queued or
// running; q_empty when no job is waiting (the last one may still run). Queue and start rule are this design's choice.
module sadc_ctrl1
  import fcic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        job_valid,
  input  pu1_job_t    job,
  input  logic        sl_done,
  output logic        busy,
  output logic        idle,
  output logic        q_empty,      // every queued job has started
  output logic [4:0]  r4_raddr,
  output logic [3:0]  d_raddr,
  output logic [1:0]  mur_sel,
  output logic        mud_sel,
  output logic        sadc_valid,
  output logic        sadc_first,
  output logic        sadc_last,
  output sadc_tag_t   sadc_tag
);
  pu1_job_t   q [2];
  logic [1:0] q_cnt;
  pu1_job_t   cur;
  logic [4:0] cnt;
  logic       launch;

  // a queued job starts on the cycle after the previous one's last read
  assign launch = (!busy || cnt == 5'd31) && q_cnt != 2'd0 && (!q[0].first_of_i || sl_done);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_cnt <= '0;
      busy  <= 1'b0;
      cnt   <= '0;
    end else begin
      // queue: pop on launch, push on job_valid
      if (launch) begin
        q[0] <= q[1];
        if (job_valid) begin
          if (q_cnt == 2'd1) q[0] <= job;
          else               q[1] <= job;
        end else begin
          q_cnt <= q_cnt - 2'd1;
        end
      end else if (job_valid) begin
        if (q_cnt == 2'd0) q[0] <= job;
        else               q[1] <= job;
        q_cnt <= q_cnt + 2'd1;
      end
      // run
      if (launch) begin
        cur  <= q[0];
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + 5'd1;
        if (cnt == 5'd31) busy <= 1'b0;
      end
    end
  end

  assign idle     = !busy && q_cnt == 2'd0;
  assign q_empty  = q_cnt == 2'd0;
  assign r4_raddr = cnt;
  assign d_raddr  = {cur.bank, cnt[2:0]};
  assign mur_sel  = cnt[4:3];
  assign mud_sel  = cur.bank;

  always_ff @(posedge clk) begin
    if (!rst_n) sadc_valid <= 1'b0;
    else        sadc_valid <= busy;
    sadc_first    <= cnt[2:0] == 3'd0;
    sadc_last     <= cnt[2:0] == 3'd7;
    sadc_tag.kind <= cur.first_of_i ? K_RG : K_DG;
    sadc_tag.k    <= cur.k;
    sadc_tag.rng  <= cur.i;
    sadc_tag.p    <= cnt[4:3];
    sadc_tag.dom  <= cur.j;
  end

  // SCtrl never has more than two domain blocks waiting
  assert property (@(posedge clk) disable iff (!rst_n) !(job_valid && !launch && q_cnt == 2'd2));
endmodule
