// dbf_ctrl: data flow control unit of the bus-interleaved de-blocking
// filter. It sequences the 1-D filter, the two 4x4 pixel arrays and the
// local SRAM through the two passes over one macroblock (MB).
//
// Both passes are one stream of 4x4 blocks, four 32-bit lines each, taken in
// the slot order of dbf_pkg and skipping blocks the filtering mode does not
// need. Each step handles one line `w` of the block now arriving (B) and the
// same line of the block before it, held in Reg1 (A):
//   * the filter combines A and B across their common edge. bS comes from the
//     MB's bS table when the two blocks share an edge the mode filters,
//     otherwise it is forced to 0 and the lines pass unchanged (this is how
//     a new row or column of blocks, or a neighbour block that is only being
//     carried along, starts without a stall);
//   * B's intermediate line goes back into Reg1, A's final line into Reg2;
//   * the transposed line `w` of the block written to Reg2 one block earlier
//     leaves Reg2: to the SRAM in the horizontal pass, to the output port in
//     the vertical pass.
// After the last block, four flush steps move Reg1 into Reg2 and four drain
// steps empty Reg2. The horizontal pass takes its lines from the input port
// (rows) and ends by writing the last block into the SRAM; only then does the
// vertical pass begin reading the SRAM (columns), because the SRAM has one
// port. This matches the turn-around of the method.
//
// Timing with no back-pressure, for a mode that moves NB blocks (4*NB words
// each way): `done` rises 8*NB+17 clock edges after the edge that takes
// `start`: 4*NB+8 steps of horizontal pass, one cycle to prime the SRAM
// read, 4*NB+8 steps of vertical pass, whose last 4*NB steps carry the output
// words. A skip-mode MB raises `done` on the edge that takes `start`.
// `in_valid`/`in_ready` and `out_valid`/`out_ready` are ordinary
// valid/ready handshakes; a missing input word or a refused output word
// stalls the whole pipeline for that cycle.
module dbf_ctrl
  import dbf_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = SRAM_WORDS,
  parameter int unsigned AW = $clog2(SRAM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  mode_t         start_mode,
  input  params_t       start_params,
  input  bs_table_t     start_bs,
  output logic          busy,
  output logic          done,
  // streams
  input  logic          in_valid,
  output logic          in_ready,
  output logic          out_valid,
  input  logic          out_ready,
  // datapath control
  output logic          src_sram,     // filter B input: 1 = SRAM, 0 = input port
  output logic [1:0]    line,         // line index for Reg1 and Reg2
  output logic          reg1_we,
  output logic          reg2_we,
  output logic          reg2_orient,
  output bs_t           fir_bs,
  output logic [7:0]    fir_alpha,
  output logic [7:0]    fir_beta,
  output logic [4:0]    fir_tc0,
  output logic          fir_luma,
  output logic          sram_en,
  output logic          sram_we,
  output logic [AW-1:0] sram_addr
);

  // Every block of the largest mode has a fixed SRAM slot.
  if (SRAM_DEPTH < SRAM_WORDS) begin : g_depth_check
    $error("SRAM_DEPTH %0d is below the %0d words of a mode-1 MB", SRAM_DEPTH, SRAM_WORDS);
  end

  typedef enum logic [2:0] {S_IDLE, S_H, S_VPRIME, S_V} state_e;
  typedef enum logic [1:0] {P_IN, P_FLUSH, P_DRAIN} sub_e;

  state_e state;
  sub_e   sub;
  mode_t  mode;
  params_t prm;
  bs_table_t bst;
  logic [SLOT_W-1:0] cs;           // slot of the block arriving now
  logic [1:0]        w;            // line index
  logic              have_r1, have_r2;
  logic [5:0]        r2id;         // SRAM block id of the block in Reg2
  logic [5:0]        r1id;
  logic              orient;

  logic vert;
  assign vert = (state == S_V) || (state == S_VPRIME);

  // First present slot at or after `from`.
  function automatic logic [SLOT_W:0] search(mode_t m, logic v, logic [SLOT_W:0] from);
    logic [SLOT_W:0] res;
    res = '1;   // not found: MSB set
    for (int s = NSLOTS - 1; s >= 0; s--)
      if ((SLOT_W + 1)'(s) >= from && slot_present(m, slot_info(v, SLOT_W'(s))))
        res = (SLOT_W + 1)'(s);
    return res;
  endfunction

  slot_t             cur;
  logic [SLOT_W:0]   nxt_slot, first_h, first_v;
  logic              last_blk, adv, rd_r2;
  logic [AW-1:0]     addr_cur, addr_nxt;

  always_comb begin
    cur      = slot_info(vert, cs);
    nxt_slot = search(mode, vert, (SLOT_W + 1)'(cs) + 1'b1);
    first_h  = search(start_mode, 1'b0, '0);
    first_v  = search(mode, 1'b1, '0);
    last_blk = nxt_slot[SLOT_W];
    rd_r2    = have_r2;

    unique case (state)
      S_H:     adv = (sub != P_IN) || in_valid;
      S_V:     adv = !rd_r2 || out_ready;
      default: adv = 1'b0;
    endcase

    in_ready  = (state == S_H) && (sub == P_IN);
    out_valid = (state == S_V) && rd_r2;
    src_sram  = vert;
    line      = w;
    reg1_we   = adv && (sub == P_IN);
    reg2_we   = adv && (sub != P_DRAIN) && have_r1;
    reg2_orient = orient;

    fir_luma  = (cur.comp == 2'd0);
    fir_alpha = fir_luma ? prm.alpha_y : prm.alpha_c;
    fir_beta  = fir_luma ? prm.beta_y  : prm.beta_c;
    fir_bs    = '0;
    if (sub == P_IN && have_r1 && edge_filtered(vert, mode, cur))
      fir_bs = edge_bs(vert, bst, cur, w);
    fir_tc0 = '0;
    if (fir_bs != 3'd0 && fir_bs != 3'd4)
      fir_tc0 = fir_luma ? prm.tc0_y[fir_bs - 3'd1] : prm.tc0_c[fir_bs - 3'd1];

    // SRAM: written from Reg2 in the horizontal pass, read ahead in the
    // vertical pass so the word for the next step is always on rdata.
    addr_cur = AW'({block_id(cur), w});
    addr_nxt = (w != 2'd3) ? addr_cur + 1'b1
                           : AW'({block_id(slot_info(1'b1, nxt_slot[SLOT_W-1:0])), 2'd0});
    sram_en   = 1'b0;
    sram_we   = 1'b0;
    sram_addr = addr_cur;
    if (state == S_H) begin
      sram_en   = adv && rd_r2;
      sram_we   = 1'b1;
      sram_addr = AW'({r2id, w});
    end else if (state == S_VPRIME) begin
      sram_en   = 1'b1;
      sram_addr = AW'({block_id(slot_info(1'b1, first_v[SLOT_W-1:0])), 2'd0});
    end else if (state == S_V && sub == P_IN) begin
      sram_en   = 1'b1;
      sram_addr = (adv && !(w == 2'd3 && last_blk)) ? addr_nxt : addr_cur;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sub     <= P_IN;
      mode    <= '0;
      prm     <= '0;
      bst     <= '0;
      cs      <= '0;
      w       <= '0;
      have_r1 <= 1'b0;
      have_r2 <= 1'b0;
      r1id    <= '0;
      r2id    <= '0;
      orient  <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mode <= start_mode;
          prm  <= start_params;
          bst  <= start_bs;
          if (first_h[SLOT_W]) begin
            done <= 1'b1;               // skip mode: nothing to move
          end else begin
            busy    <= 1'b1;
            state   <= S_H;
            sub     <= P_IN;
            cs      <= first_h[SLOT_W-1:0];
            w       <= '0;
            have_r1 <= 1'b0;
            have_r2 <= 1'b0;
          end
        end
        S_VPRIME: begin
          state   <= S_V;
          sub     <= P_IN;
          cs      <= first_v[SLOT_W-1:0];
          w       <= '0;
          have_r1 <= 1'b0;
          have_r2 <= 1'b0;
        end
        default: if (adv) begin       // S_H, S_V
          w <= w + 2'd1;
          if (w == 2'd3) begin
            orient <= ~orient;
            unique case (sub)
              P_IN: begin
                r2id    <= r1id;
                have_r2 <= have_r1;
                r1id    <= block_id(cur);
                have_r1 <= 1'b1;
                if (last_blk) sub <= P_FLUSH;
                else          cs  <= nxt_slot[SLOT_W-1:0];
              end
              P_FLUSH: begin
                r2id    <= r1id;
                have_r2 <= have_r1;
                have_r1 <= 1'b0;
                sub     <= P_DRAIN;
              end
              default: begin          // P_DRAIN
                have_r2 <= 1'b0;
                sub     <= P_IN;
                if (state == S_H) begin
                  state <= S_VPRIME;
                end else begin
                  state <= S_IDLE;
                  busy  <= 1'b0;
                  done  <= 1'b1;
                end
              end
            endcase
          end
        end
      endcase
    end
  end

endmodule
