// mem_ctrl: MemCtrl, the controller of the main memory.
//
// On a start pulse it clears MemAddrG and raises MemAddrG_En (also the RAM
// read enable), one word per cycle. The RAM answers one cycle later, so the
// tag of each address is delayed one cycle (tag_out) and marks the word on the
// data bus; PG-DataValid (pg_valid) flags G words, SG-DataValid (sg_valid) R
// and B words. Two pauses are inserted:
//   * after R^b_i, when domain blocks follow, MemAddrG_En drops for GAP
//     cycles (8, from the document) before D^g_{i+1} is fetched;
//   * after the last block of an i, the fetch waits at least DRAIN_MIN
//     cycles and until PU1 has started its last queued domain block
//     (pu1_started). From then on PU1 reads word n of RAM 4-R no later than
//     the next R^g_{i+1} writes it, the means of the new set arrive after
//     the old ones were used, and PU2 has read the last rows of RAM D_R, so
//     the next set overlaps the end of the matching. This costs about 9
//     cycles per set; the document counts two. The wait rule is this
//     design's.
// After the last block of the image the fetch ends, and done follows once
// everything is idle (pu_idle) and DRAIN_MIN cycles have passed.
module mem_ctrl
  import fcic_pkg::*;
#(
  parameter int unsigned GAP       = 8,
  parameter int unsigned DRAIN_MIN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fetch_tag_t  tag_in,
  input  logic        last_of_i,
  input  logic        last_all,
  input  logic        pu_idle,
  input  logic        pu1_started,
  output logic        addrg_en,
  output logic        addrg_clr,
  output fetch_tag_t  tag_out,
  output logic        pg_valid,
  output logic        sg_valid,
  output logic        busy,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_GAP, S_DRAIN, S_FINISH} state_e;
  state_e     state;
  logic [4:0] cnt;

  assign addrg_en  = state == S_RUN;
  assign addrg_clr = state == S_IDLE && start;
  assign busy      = state != S_IDLE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_RUN;
        S_RUN: begin
          if (last_all) begin
            state <= S_FINISH; cnt <= 5'(DRAIN_MIN);
          end else if (last_of_i) begin
            state <= S_DRAIN;  cnt <= 5'(DRAIN_MIN);
          end else if (tag_in.kind == K_RB && tag_in.p == 5'd31) begin
            state <= S_GAP;    cnt <= 5'(GAP - 1);
          end
        end
        S_GAP: begin
          if (cnt == 5'd0) state <= S_RUN;
          else             cnt <= cnt - 5'd1;
        end
        S_DRAIN, S_FINISH: begin
          if (cnt != 5'd0) cnt <= cnt - 5'd1;
          else if (state == S_FINISH) begin
            if (pu_idle) begin
              state <= S_IDLE; done <= 1'b1;
            end
          end else if (pu1_started) begin
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;
  end

  assign pg_valid = tag_out.valid && (tag_out.kind == K_RG || tag_out.kind == K_DG);
  assign sg_valid = tag_out.valid && (tag_out.kind == K_RR || tag_out.kind == K_RB);
endmodule
