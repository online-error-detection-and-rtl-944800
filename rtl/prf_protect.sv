// Physical register file protected against erratic bits.
//
// For cores that rename into a physical register file. Values are stored
// with a parity bit. When a pipeline read fails its parity check the file
// stalls the pipeline (stall) and runs the erratic-bit recovery sequence on
// that register (erratic_recovery, 6 cycles). Then:
//   * REC_ERRATIC: the recovered word NOT(C) is written, raw, into a newly
//     allocated free register; every rename-table entry that pointed to the
//     faulty register is redirected to the new one; the faulty register goes
//     to the quarantine list (vccmin_list) and flush pulses so the pipeline
//     re-executes from its oldest instruction. The remap is done only if
//     needed: if no rename-table entry points to the faulty register (it
//     holds an older version still referenced in flight), or if no register
//     is free, the recovered word is written back into the faulty register
//     instead and nothing is quarantined (rec_remapped = 0).
//   * REC_SOFT: the value is lost here; flush pulses so the pipeline can
//     regenerate it if its producer has not left the pipeline yet.
//   * REC_OK: the re-read value was clean; no flush.
// Every T cycles the quarantine list hands all its registers back to the
// free list; a register that is still faulty is caught again on its next
// failing read.
//
// Interface and timing. Lookups (lk_*) and reads (rd_*) are combinational;
// rename (ren_*), commit release (rel_*) and writeback (wr_*) act at the
// clock edge. rd_err[i] flags a failing read in the same cycle; stall rises
// in that cycle and stays high until the recovery is applied. rec_done
// pulses one cycle after that, with the rec_* outputs, which then hold. While
// stall is high the pipeline must not rename or write back (ren_grant is
// forced low and writes are ignored). Releases of quarantined registers are
// dropped, since the quarantine list returns them itself. Read port 0 is
// shared with the recovery sequence, which uses it only while stalled.
// The flow (stall, recover, store in a free register, update the rename
// table, flush) and the quarantine follow the published scheme; the port
// counts, the fallback when no register is free and the exact cycle timing
// are this design's choices.
module prf_protect
  import erratic_pkg::*;
#(
  parameter int unsigned NPHYS = PRF_REGS_DEF,
  parameter int unsigned NARCH = ARCH_REGS_DEF,
  parameter int unsigned W     = DATA_W_DEF,
  parameter int unsigned NRD   = RD_PORTS_DEF,
  parameter int unsigned T     = QUARANTINE_DEF,
  localparam int unsigned PW   = (NPHYS > 1) ? $clog2(NPHYS) : 1,
  localparam int unsigned LW   = (NARCH > 1) ? $clog2(NARCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // rename
  input  logic          ren_req,
  input  logic [LW-1:0] ren_arch,
  output logic          ren_grant,
  output logic [PW-1:0] ren_preg,
  output logic [PW-1:0] ren_old,
  input  logic [LW-1:0] lk_arch [NRD],
  output logic [PW-1:0] lk_preg [NRD],
  // commit: release of a previous mapping
  input  logic          rel_en,
  input  logic [PW-1:0] rel_preg,
  // writeback
  input  logic          wr_en,
  input  logic [PW-1:0] wr_preg,
  input  logic [W-1:0]  wr_data,
  // operand reads
  input  logic          rd_en   [NRD],
  input  logic [PW-1:0] rd_preg [NRD],
  output logic [W-1:0]  rd_data [NRD],
  output logic          rd_err  [NRD],
  // recovery
  output logic          stall,
  output logic          flush,
  output logic          rec_done,
  output rec_result_t   rec_result,
  output logic [PW-1:0] rec_preg,
  output logic [PW-1:0] rec_new_preg,
  output logic          rec_remapped,
  output logic          rec_rat_hit,   // the rename table pointed to the faulty register
  output logic [W-1:0]  rec_data,
  output logic [W:0]    rec_err_mask,
  // pool status
  output logic [PW:0]   free_count,
  output logic [NPHYS-1:0] free_vec,
  output logic [PW:0]   vccmin_count,
  output logic [NPHYS-1:0] quarantined,
  output logic          vccmin_release,
  // fault injection into the array (tie to zero in use)
  input  logic          inj_stuck_we,
  input  logic          inj_flip_we,
  input  logic [PW-1:0] inj_addr,
  input  logic [W:0]    inj_mask,
  input  logic [W:0]    inj_value
);

  // ---------------- register file and parity ----------------
  logic [PW-1:0] rf_rd_addr [NRD];
  logic [W:0]    rf_rd_word [NRD];
  logic          rf_wr_en;
  logic [PW-1:0] rf_wr_addr;
  logic [W:0]    rf_wr_word;
  logic [W:0]    wb_word;

  regfile_parity #(.DEPTH(NPHYS), .W(W), .NRD(NRD)) u_rf (
    .clk, .rst_n,
    .rd_addr(rf_rd_addr), .rd_word(rf_rd_word),
    .wr_en(rf_wr_en), .wr_addr(rf_wr_addr), .wr_word(rf_wr_word),
    .inj_stuck_we, .inj_flip_we, .inj_addr, .inj_mask, .inj_value
  );

  logic wb_par;
  parity_gen #(.W(W)) u_pgen (.data(wr_data), .parity(wb_par));
  always_comb wb_word = {wb_par, wr_data};

  logic [NRD-1:0] perr;
  for (genvar p = 0; p < NRD; p++) begin : g_chk
    parity_check #(.W(W)) u_pchk (.word(rf_rd_word[p]), .error(perr[p]));
  end

  // ---------------- recovery sequencer ----------------
  logic          eng_start, eng_busy, eng_done;
  rec_result_t   eng_result;
  logic [W:0]    eng_d, eng_e;
  logic [PW-1:0] eng_rx, eng_rd_addr, eng_wr_addr, start_reg;
  logic          eng_wr_en;
  logic [W:0]    eng_wr_word;

  erratic_recovery #(.DEPTH(NPHYS), .W(W)) u_rec (
    .clk, .rst_n,
    .start(eng_start), .reg_idx(start_reg),
    .busy(eng_busy), .done(eng_done), .result(eng_result),
    .d_word(eng_d), .e_word(eng_e), .rx(eng_rx),
    .rf_rd_addr(eng_rd_addr), .rf_rd_word(rf_rd_word[0]),
    .rf_wr_en(eng_wr_en), .rf_wr_addr(eng_wr_addr), .rf_wr_word(eng_wr_word)
  );

  // first failing read port
  logic          err_any;
  always_comb begin
    err_any   = 1'b0;
    start_reg = '0;
    for (int p = NRD - 1; p >= 0; p--)
      if (rd_en[p] && perr[p]) begin
        err_any   = 1'b1;
        start_reg = rd_preg[p];
      end
  end

  // ---------------- free list, quarantine, rename table ----------------
  logic          fl_alloc_en, fl_alloc_valid;
  logic [PW-1:0] fl_alloc_id;
  logic          fl_rel_en;
  logic [NPHYS-1:0] vq_rel_vec;
  logic          vq_add_en;
  logic          rat_remap_en, rat_remap_hit;

  // the recovery result is applied in the sequencer's DONE cycle
  logic apply_erratic, apply_remap;
  always_comb begin
    apply_erratic = eng_done && (eng_result == REC_ERRATIC);
    apply_remap   = apply_erratic && fl_alloc_valid && rat_remap_hit;
  end

  always_comb begin
    eng_start   = err_any && !eng_busy;
    stall       = err_any || eng_busy;
    ren_grant   = ren_req && fl_alloc_valid && !stall;
    ren_preg    = fl_alloc_id;
    fl_alloc_en = ren_grant || apply_remap;
    fl_rel_en   = rel_en && !quarantined[rel_preg] && !(apply_remap && rel_preg == eng_rx);
    vq_add_en   = apply_remap;
    rat_remap_en = apply_remap;
  end

  free_list #(.N(NPHYS), .INIT_USED(NARCH)) u_fl (
    .clk, .rst_n,
    .alloc_en(fl_alloc_en), .alloc_valid(fl_alloc_valid), .alloc_id(fl_alloc_id),
    .rel_en(fl_rel_en), .rel_id(rel_preg), .bulk_vec(vq_rel_vec),
    .free_vec, .free_count
  );

  vccmin_list #(.N(NPHYS), .T(T)) u_vq (
    .clk, .rst_n,
    .add_en(vq_add_en), .add_id(eng_rx), .q_vec(quarantined),
    .release_pulse(vccmin_release), .release_vec(vq_rel_vec), .count(vccmin_count)
  );

  rat #(.NARCH(NARCH), .NPHYS(NPHYS), .NRD(NRD)) u_rat (
    .clk, .rst_n,
    .lk_arch, .lk_preg,
    .ren_we(ren_grant), .ren_arch, .ren_preg(fl_alloc_id), .ren_old,
    .remap_en(rat_remap_en), .remap_old(eng_rx), .remap_new(fl_alloc_id),
    .remap_hit(rat_remap_hit)
  );

  // ---------------- register file port multiplexing ----------------
  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rf_rd_addr[p] = rd_preg[p];
      rd_data[p]    = rf_rd_word[p][W-1:0];
      rd_err[p]     = rd_en[p] && perr[p];
    end
    if (eng_busy) rf_rd_addr[0] = eng_rd_addr;

    rf_wr_en   = wr_en && !stall;
    rf_wr_addr = wr_preg;
    rf_wr_word = wb_word;
    if (eng_wr_en) begin
      rf_wr_en   = 1'b1;
      rf_wr_addr = eng_wr_addr;
      rf_wr_word = eng_wr_word;
    end else if (apply_erratic) begin
      // recovered word, parity bit included, into the new (or same) register
      rf_wr_en   = 1'b1;
      rf_wr_addr = apply_remap ? fl_alloc_id : eng_rx;
      rf_wr_word = eng_d;
    end
  end

  // ---------------- recovery report ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_done     <= 1'b0;
      flush        <= 1'b0;
      rec_result   <= REC_NONE;
      rec_preg     <= '0;
      rec_new_preg <= '0;
      rec_remapped <= 1'b0;
      rec_rat_hit  <= 1'b0;
      rec_data     <= '0;
      rec_err_mask <= '0;
    end else begin
      rec_done <= eng_done;
      flush    <= eng_done && (eng_result != REC_OK);
      if (eng_done) begin
        rec_result   <= eng_result;
        rec_preg     <= eng_rx;
        rec_new_preg <= apply_remap ? fl_alloc_id : eng_rx;
        rec_remapped <= apply_remap;
        rec_rat_hit  <= rat_remap_hit;
        rec_data     <= eng_d[W-1:0];
        rec_err_mask <= eng_e;
      end
    end
  end

endmodule
