// sctrl: SCtrl, the storing controller.
//
// Decides where fetched data and MCC results are kept:
//   * words of R^g_i go to RAM 4-R at address p (word p of the 16x16 block);
//   * contracted pixels of every G block (D_j, and D_i built from R^g_i) go
//     to RAM D, which holds two blocks (bank = address bit 3, row = p[3:1]);
//     the left four pixels of a row come from the left half, the right four
//     sixteen words later, written with byte enables; D_i also goes to RAM D_R;
//   * M(R) of R^g_{i,p} loads mu(R_p), M(R) of any other range block loads
//     mu(R_D); M(D) loads mu(D) of the block's bank, and for D_i also mu(D_R).
// When the mean of a G block is ready the block is handed to PU1 as a job
// (bank, k, i, j; first_of_i for D_i). The banks alternate block by block.
// The document gives the unit's purpose; this bank scheme is this design's.
module sctrl
  import fcic_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  fetch_tag_t      tag0,
  input  logic [DW-1:0]   data0,
  input  logic            d_valid,
  input  fetch_tag_t      tag1,
  input  logic [3:0][7:0] d_pix,
  input  logic            mu_r_valid,
  input  logic            mu_d_valid,
  input  fetch_tag_t      tag3,
  // RAM 4-R
  output logic            r4_we,
  output logic [4:0]      r4_waddr,
  output logic [DW-1:0]   r4_wdata,
  // RAM D and RAM D_R (same data and byte enables)
  output logic            d_we,
  output logic [3:0]      d_waddr,
  output logic            dr_we,
  output logic [2:0]      dr_waddr,
  output logic [7:0]      d_be,
  output logic [DW-1:0]   d_wdata,
  // mean registers
  output logic            mur_we,     // mu(R_p), p = mur_idx
  output logic [1:0]      mur_idx,
  output logic            murd_we,    // mu(R_D)
  output logic            mud_we,     // mu(D) of bank mud_bank
  output logic            mud_bank,
  output logic            mudr_we,    // mu(D_R)
  // PU1 job
  output logic            job_valid,
  output pu1_job_t        job,
  // RAM 4-R is being refilled: PU2's searchless reads of the old set are over
  output logic            rg_start
);
  logic wr_bank;

  always_ff @(posedge clk) begin
    if (!rst_n) wr_bank <= 1'b0;
    else if (d_valid && tag1.p == 5'd31) wr_bank <= ~wr_bank;
  end

  assign r4_we    = tag0.valid && tag0.kind == K_RG;
  assign r4_waddr = tag0.p;
  assign r4_wdata = data0;
  assign rg_start = r4_we && tag0.p == 5'd0;

  assign d_we     = d_valid;
  assign d_waddr  = {wr_bank, tag1.p[3:1]};
  assign dr_we    = d_valid && tag1.kind == K_RG;
  assign dr_waddr = tag1.p[3:1];
  assign d_be     = tag1.p[4] ? 8'hF0 : 8'h0F;
  assign d_wdata  = {d_pix, d_pix};

  assign mur_we   = mu_r_valid && tag3.kind == K_RG;
  assign mur_idx  = tag3.p[4:3];
  assign murd_we  = mu_r_valid && tag3.kind != K_RG;
  assign mud_we   = mu_d_valid;
  assign mud_bank = ~wr_bank;        // the bank flipped after the block's last row
  assign mudr_we  = mu_d_valid && tag3.kind == K_RG;

  assign job_valid      = mu_d_valid;
  assign job.bank       = ~wr_bank;
  assign job.first_of_i = tag3.kind == K_RG;
  assign job.k          = tag3.k;
  assign job.i          = tag3.i;
  assign job.j          = tag3.j;
endmodule
