// Automatic frequency control (AFC): coarse-band selection before the
// bang-bang loop starts, as the published design describes ("AFC initially
// selects a DCO coarse tuning code ... then the BB-PFD starts a fine-locking
// process"). How it does so is not published; this design uses a
// successive-approximation search over the 4-bit coarse code. For each bit,
// MSB first, the trial code is applied, the DCO is given SETTLE reference
// cycles, and the feedback edges are counted over a window of WIN reference
// periods (WIN*ratio FIN cycles, ratio being the pre-divider setting). More
// than WIN feedback edges means the DCO is too fast and the bit is cleared.
// After the last bit `done` rises and stays high; it releases the loop.
// Clock crossing: the edge counter runs on FFEED; its enable and clear are
// passed in through two-flop synchronizers, and its value is read only
// after GUARD idle cycles, when it is static. A higher coarse code is taken
// to mean a faster DCO.
module afc
  import dpll_pkg::*;
#(
  parameter int unsigned WIN    = 64,
  parameter int unsigned SETTLE = 16,
  parameter int unsigned GUARD  = 16,
  parameter int unsigned RW     = 8
) (
  input  logic                fin,
  input  logic                rst_n,
  input  logic [RW-1:0]       ratio,    // pre-divider ratio FIN/FREF (>= 1)
  input  logic                ffeed,
  output logic [COARSE_W-1:0] coarse,
  output logic                done
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [2:0] {S_SETTLE, S_COUNT, S_DRAIN, S_DECIDE, S_DONE} afc_state_e;

  localparam int unsigned TW = 16;

  afc_state_e                  st;
  logic [TW-1:0]               timer;
  logic [$clog2(COARSE_W)-1:0] bit_i;
  logic                        cnt_en, cnt_clr;
  logic [TW-1:0]               r_mul;   // ratio, at least 1
  // feedback-clock domain
  logic [1:0]                  en_sync, clr_sync;
  logic [TW-1:0]               fb_cnt;

  assign r_mul = (ratio == '0) ? TW'(1) : TW'(ratio);

  always_ff @(posedge fin or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_SETTLE;
      timer   <= '0;
      bit_i   <= $bits(bit_i)'(COARSE_W - 1);
      coarse  <= COARSE_W'(1) << (COARSE_W - 1);
      done    <= 1'b0;
      cnt_en  <= 1'b0;
      cnt_clr <= 1'b1;
    end else begin
      unique case (st)
        S_SETTLE: begin
          cnt_clr <= 1'b1;
          if (timer >= TW'(SETTLE) * r_mul) begin
            timer   <= '0;
            cnt_clr <= 1'b0;
            cnt_en  <= 1'b1;
            st      <= S_COUNT;
          end else timer <= timer + 1'b1;
        end
        S_COUNT: begin
          if (timer >= TW'(WIN) * r_mul - 1'b1) begin
            timer  <= '0;
            cnt_en <= 1'b0;
            st     <= S_DRAIN;
          end else timer <= timer + 1'b1;
        end
        S_DRAIN: begin
          if (timer >= TW'(GUARD) * r_mul) begin
            timer <= '0;
            st    <= S_DECIDE;
          end else timer <= timer + 1'b1;
        end
        S_DECIDE: begin
          // keep the trial bit unless the DCO was too fast
          logic [COARSE_W-1:0] kept;
          kept = (fb_cnt > TW'(WIN)) ? coarse & ~(COARSE_W'(1) << bit_i) : coarse;
          if (bit_i == '0) begin
            coarse <= kept;
            done   <= 1'b1;
            st     <= S_DONE;
          end else begin
            coarse <= kept | (COARSE_W'(1) << (bit_i - 1'b1));
            bit_i  <= bit_i - 1'b1;
            st     <= S_SETTLE;
          end
        end
        default: ;  // S_DONE: hold the code
      endcase
    end
  end

  always_ff @(posedge ffeed or negedge rst_n) begin
    if (!rst_n) begin
      en_sync  <= '0;
      clr_sync <= '1;
      fb_cnt   <= '0;
    end else begin
      en_sync  <= {en_sync[0], cnt_en};
      clr_sync <= {clr_sync[0], cnt_clr};
      if (clr_sync[1])     fb_cnt <= '0;
      else if (en_sync[1]) fb_cnt <= fb_cnt + 1'b1;
    end
  end
endmodule
