// Architectural register file with spare registers against erratic bits.
//
// For cores that keep committed values in an architectural register file
// (in-order cores, or out-of-order cores with values in the reorder buffer),
// where a faulty register cannot be renamed away. A small spare file of
// NSPARE registers sits beside the NARCH-entry normal file; architectural
// register t can only use spare slot t mod NSPARE (the low bits of its tag,
// as in a direct-mapped cache). A bit vector, in_spare, says for every
// register which bank holds it; rd_bank reports that bit with each read, so
// accesses go straight to the right bank.
//
// When a read fails its parity check the file stalls and runs the
// erratic-bit recovery sequence on the bank that holds the register. On
// REC_ERRATIC for a register in the normal file, the recovered word moves to
// its spare slot. If another register j already uses that slot (found by
// ORing the in_spare bits of the registers that share it), j's value is first
// evicted back to normal entry j; both moves and the bit-vector update happen
// in the same cycle. On REC_ERRATIC for a register that already sits in the
// spare file, the recovered word goes back to its normal entry. REC_SOFT
// leaves the value lost. Both outcomes pulse flush.
// To find out whether quarantined normal entries work again, every T cycles
// all registers in the spare file are moved back to the normal file, one per
// cycle while stall is high; any that is still faulty is caught again.
//
// Timing as in prf_protect: combinational reads with rd_err in the same
// cycle, writes at the clock edge, writes ignored while stall is high,
// rec_done one cycle after the recovery is applied. Read port 0 of each bank
// is shared with the recovery sequence; the spare bank has one extra read
// port for evictions and migrations.
// The spare bank, the low-tag-bit mapping, the bit vector, the eviction and
// the periodic re-enabling follow the published scheme; the sizes, the
// handling of a faulty spare entry, the one-by-one migration and the timing
// are this design's choices. NSPARE must be a power of two.
module arf_spare
  import erratic_pkg::*;
#(
  parameter int unsigned NARCH  = ARCH_REGS_DEF,
  parameter int unsigned NSPARE = SPARE_REGS_DEF,
  parameter int unsigned W      = DATA_W_DEF,
  parameter int unsigned NRD    = RD_PORTS_DEF,
  parameter int unsigned T      = QUARANTINE_DEF,
  localparam int unsigned LW    = (NARCH > 1) ? $clog2(NARCH) : 1,
  localparam int unsigned SW    = (NSPARE > 1) ? $clog2(NSPARE) : 1,
  localparam int unsigned CW    = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // writeback
  input  logic          wr_en,
  input  logic [LW-1:0] wr_tag,
  input  logic [W-1:0]  wr_data,
  // operand reads
  input  logic          rd_en   [NRD],
  input  logic [LW-1:0] rd_tag  [NRD],
  output logic [W-1:0]  rd_data [NRD],
  output logic          rd_bank [NRD],   // 1: served by the spare file
  output logic          rd_err  [NRD],
  // recovery
  output logic          stall,
  output logic          flush,
  output logic          rec_done,
  output rec_result_t   rec_result,
  output logic [LW-1:0] rec_tag,
  output logic          rec_to_spare,    // moved into the spare file
  output logic          rec_evicted,     // another register was evicted
  output logic [LW-1:0] rec_evict_tag,
  output logic [W-1:0]  rec_data,
  output logic [W:0]    rec_err_mask,
  output logic [NARCH-1:0] in_spare,
  output logic          migrating,
  // fault injection (tie to zero in use); inj_bank 1 selects the spare file
  input  logic          inj_stuck_we,
  input  logic          inj_flip_we,
  input  logic          inj_bank,
  input  logic [LW-1:0] inj_addr,
  input  logic [W:0]    inj_mask,
  input  logic [W:0]    inj_value
);

  function automatic logic [SW-1:0] slot_of(input logic [LW-1:0] tag);
    return SW'(tag % LW'(NSPARE));
  endfunction

  // ---------------- banks ----------------
  logic [LW-1:0] n_rd_addr [NRD];
  logic [W:0]    n_rd_word [NRD];
  logic [SW-1:0] s_rd_addr [NRD+1];
  logic [W:0]    s_rd_word [NRD+1];
  logic          n_wr_en, s_wr_en;
  logic [LW-1:0] n_wr_addr;
  logic [SW-1:0] s_wr_addr;
  logic [W:0]    n_wr_word, s_wr_word;
  logic [W:0]    wb_word;

  regfile_parity #(.DEPTH(NARCH), .W(W), .NRD(NRD)) u_norm (
    .clk, .rst_n, .rd_addr(n_rd_addr), .rd_word(n_rd_word),
    .wr_en(n_wr_en), .wr_addr(n_wr_addr), .wr_word(n_wr_word),
    .inj_stuck_we(inj_stuck_we && !inj_bank), .inj_flip_we(inj_flip_we && !inj_bank),
    .inj_addr, .inj_mask, .inj_value
  );

  regfile_parity #(.DEPTH(NSPARE), .W(W), .NRD(NRD + 1)) u_spare (
    .clk, .rst_n, .rd_addr(s_rd_addr), .rd_word(s_rd_word),
    .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_word(s_wr_word),
    .inj_stuck_we(inj_stuck_we && inj_bank), .inj_flip_we(inj_flip_we && inj_bank),
    .inj_addr(slot_of(inj_addr)), .inj_mask, .inj_value
  );

  logic wb_par;
  parity_gen #(.W(W)) u_pgen (.data(wr_data), .parity(wb_par));
  always_comb wb_word = {wb_par, wr_data};

  logic [W:0]     rd_word [NRD];
  logic [NRD-1:0] perr;
  for (genvar p = 0; p < NRD; p++) begin : g_chk
    parity_check #(.W(W)) u_pchk (.word(rd_word[p]), .error(perr[p]));
  end

  // ---------------- recovery sequencer ----------------
  logic          eng_start, eng_busy, eng_done, eng_wr_en;
  rec_result_t   eng_result;
  logic [W:0]    eng_d, eng_e, eng_wr_word, eng_rd_word;
  logic [LW-1:0] eng_rx, eng_rd_addr, eng_wr_addr, start_tag;
  logic          rx_bank;          // bank of the register under recovery

  erratic_recovery #(.DEPTH(NARCH), .W(W)) u_rec (
    .clk, .rst_n,
    .start(eng_start), .reg_idx(start_tag),
    .busy(eng_busy), .done(eng_done), .result(eng_result),
    .d_word(eng_d), .e_word(eng_e), .rx(eng_rx),
    .rf_rd_addr(eng_rd_addr), .rf_rd_word(eng_rd_word),
    .rf_wr_en(eng_wr_en), .rf_wr_addr(eng_wr_addr), .rf_wr_word(eng_wr_word)
  );

  logic err_any;
  always_comb begin
    err_any   = 1'b0;
    start_tag = '0;
    for (int p = NRD - 1; p >= 0; p--)
      if (rd_en[p] && perr[p]) begin
        err_any   = 1'b1;
        start_tag = rd_tag[p];
      end
  end

  // owner of the spare slot of the register under recovery
  logic          owner_any;
  logic [LW-1:0] owner_tag;
  always_comb begin
    owner_any = 1'b0;
    owner_tag = '0;
    for (int j = 0; j < NARCH; j++)
      if (in_spare[j] && slot_of(LW'(j)) == slot_of(eng_rx) && LW'(j) != eng_rx) begin
        owner_any = 1'b1;
        owner_tag = LW'(j);
      end
  end

  // ---------------- periodic re-enabling ----------------
  logic [CW-1:0] timer;
  logic          mig_pending;
  logic          mig_any;
  logic [LW-1:0] mig_tag;
  always_comb begin
    mig_any = 1'b0;
    mig_tag = '0;
    for (int j = NARCH - 1; j >= 0; j--)
      if (in_spare[j]) begin
        mig_any = 1'b1;
        mig_tag = LW'(j);
      end
  end

  logic mig_step;
  logic apply_erratic;
  always_comb begin
    migrating     = mig_pending && mig_any && !eng_busy;
    mig_step      = migrating;
    eng_start     = err_any && !eng_busy && !migrating;
    stall         = err_any || eng_busy || migrating;
    apply_erratic = eng_done && (eng_result == REC_ERRATIC);
  end

  // ---------------- port multiplexing ----------------
  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      n_rd_addr[p] = rd_tag[p];
      s_rd_addr[p] = slot_of(rd_tag[p]);
      rd_bank[p]   = in_spare[rd_tag[p]];
      rd_word[p]   = rd_bank[p] ? s_rd_word[p] : n_rd_word[p];
      rd_data[p]   = rd_word[p][W-1:0];
      rd_err[p]    = rd_en[p] && perr[p];
    end
    s_rd_addr[NRD] = migrating ? slot_of(mig_tag) : slot_of(eng_rx);
    if (eng_busy) begin
      n_rd_addr[0] = eng_rd_addr;
      s_rd_addr[0] = slot_of(eng_rd_addr);
    end
    eng_rd_word = rx_bank ? s_rd_word[0] : n_rd_word[0];

    n_wr_en   = wr_en && !stall && !in_spare[wr_tag];
    n_wr_addr = wr_tag;
    n_wr_word = wb_word;
    s_wr_en   = wr_en && !stall && in_spare[wr_tag];
    s_wr_addr = slot_of(wr_tag);
    s_wr_word = wb_word;

    if (eng_wr_en) begin
      n_wr_en   = !rx_bank;
      n_wr_addr = eng_wr_addr;
      n_wr_word = eng_wr_word;
      s_wr_en   = rx_bank;
      s_wr_addr = slot_of(eng_wr_addr);
      s_wr_word = eng_wr_word;
    end else if (apply_erratic) begin
      if (!rx_bank) begin
        // recovered word into the spare slot; evict its previous owner
        s_wr_en   = 1'b1;
        s_wr_addr = slot_of(eng_rx);
        s_wr_word = eng_d;
        n_wr_en   = owner_any;
        n_wr_addr = owner_tag;
        n_wr_word = s_rd_word[NRD];
      end else begin
        // the spare entry itself is faulty: back to the normal file
        s_wr_en   = 1'b0;
        n_wr_en   = 1'b1;
        n_wr_addr = eng_rx;
        n_wr_word = eng_d;
      end
    end else if (mig_step) begin
      s_wr_en   = 1'b0;
      n_wr_en   = 1'b1;
      n_wr_addr = mig_tag;
      n_wr_word = s_rd_word[NRD];
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_spare      <= '0;
      rx_bank       <= 1'b0;
      timer         <= '0;
      mig_pending   <= 1'b0;
      rec_done      <= 1'b0;
      flush         <= 1'b0;
      rec_result    <= REC_NONE;
      rec_tag       <= '0;
      rec_to_spare  <= 1'b0;
      rec_evicted   <= 1'b0;
      rec_evict_tag <= '0;
      rec_data      <= '0;
      rec_err_mask  <= '0;
    end else begin
      timer <= (timer == CW'(T - 1)) ? '0 : timer + 1'b1;
      if (timer == CW'(T - 1)) mig_pending <= 1'b1;
      else if (mig_pending && !mig_any && !eng_busy) mig_pending <= 1'b0;

      if (eng_start) rx_bank <= in_spare[start_tag];

      if (apply_erratic) begin
        if (!rx_bank) begin
          in_spare[eng_rx] <= 1'b1;
          if (owner_any) in_spare[owner_tag] <= 1'b0;
        end else begin
          in_spare[eng_rx] <= 1'b0;
        end
      end else if (mig_step) begin
        in_spare[mig_tag] <= 1'b0;
      end

      rec_done <= eng_done;
      flush    <= eng_done && (eng_result != REC_OK);
      if (eng_done) begin
        rec_result    <= eng_result;
        rec_tag       <= eng_rx;
        rec_to_spare  <= apply_erratic && !rx_bank;
        rec_evicted   <= apply_erratic && !rx_bank && owner_any;
        rec_evict_tag <= owner_tag;
        rec_data      <= eng_d[W-1:0];
        rec_err_mask  <= eng_e;
      end
    end
  end

endmodule
