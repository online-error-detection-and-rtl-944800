// Erratic-bit tolerant register files: both organisations side by side.
//
// p_*: physical register file (renaming cores). A parity error on a read
//      triggers the invert / write-back / re-read / XNOR recovery sequence;
//      a register with an erratic (temporarily stuck) bit is replaced by a
//      free register holding the recovered value, the rename table is
//      updated, and the faulty register is quarantined for T cycles.
// a_*: architectural register file (non-renaming cores). The same recovery
//      sequence; a register with an erratic bit moves to a spare register
//      selected by the low bits of its tag, and every T cycles the spare
//      residents move back to the normal file.
// The two share nothing; each brings out its own ports, including the fault
// injection inputs of its storage cells (tie to zero in use). See
// prf_protect and arf_spare for the interfaces and timing.
// Sizes default to the evaluated core's 128 integer physical registers, with
// 64-bit values, 16 architectural registers, 4 spare registers, 2 read ports
// and T = 1,000,000 cycles chosen by this design.
module erratic_rf_top
  import erratic_pkg::*;
#(
  parameter int unsigned NPHYS  = PRF_REGS_DEF,
  parameter int unsigned NARCH  = ARCH_REGS_DEF,
  parameter int unsigned NSPARE = SPARE_REGS_DEF,
  parameter int unsigned W      = DATA_W_DEF,
  parameter int unsigned NRD    = RD_PORTS_DEF,
  parameter int unsigned T      = QUARANTINE_DEF,
  localparam int unsigned PW    = (NPHYS > 1) ? $clog2(NPHYS) : 1,
  localparam int unsigned LW    = (NARCH > 1) ? $clog2(NARCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,

  // ---------------- physical register file ----------------
  input  logic          p_ren_req,
  input  logic [LW-1:0] p_ren_arch,
  output logic          p_ren_grant,
  output logic [PW-1:0] p_ren_preg,
  output logic [PW-1:0] p_ren_old,
  input  logic [LW-1:0] p_lk_arch [NRD],
  output logic [PW-1:0] p_lk_preg [NRD],
  input  logic          p_rel_en,
  input  logic [PW-1:0] p_rel_preg,
  input  logic          p_wr_en,
  input  logic [PW-1:0] p_wr_preg,
  input  logic [W-1:0]  p_wr_data,
  input  logic          p_rd_en   [NRD],
  input  logic [PW-1:0] p_rd_preg [NRD],
  output logic [W-1:0]  p_rd_data [NRD],
  output logic          p_rd_err  [NRD],
  output logic          p_stall,
  output logic          p_flush,
  output logic          p_rec_done,
  output rec_result_t   p_rec_result,
  output logic [PW-1:0] p_rec_preg,
  output logic [PW-1:0] p_rec_new_preg,
  output logic          p_rec_remapped,
  output logic          p_rec_rat_hit,
  output logic [W-1:0]  p_rec_data,
  output logic [W:0]    p_rec_err_mask,
  output logic [PW:0]   p_free_count,
  output logic [NPHYS-1:0] p_free_vec,
  output logic [PW:0]   p_vccmin_count,
  output logic [NPHYS-1:0] p_quarantined,
  output logic          p_vccmin_release,
  input  logic          p_inj_stuck_we,
  input  logic          p_inj_flip_we,
  input  logic [PW-1:0] p_inj_addr,
  input  logic [W:0]    p_inj_mask,
  input  logic [W:0]    p_inj_value,

  // ---------------- architectural register file ----------------
  input  logic          a_wr_en,
  input  logic [LW-1:0] a_wr_tag,
  input  logic [W-1:0]  a_wr_data,
  input  logic          a_rd_en   [NRD],
  input  logic [LW-1:0] a_rd_tag  [NRD],
  output logic [W-1:0]  a_rd_data [NRD],
  output logic          a_rd_bank [NRD],
  output logic          a_rd_err  [NRD],
  output logic          a_stall,
  output logic          a_flush,
  output logic          a_rec_done,
  output rec_result_t   a_rec_result,
  output logic [LW-1:0] a_rec_tag,
  output logic          a_rec_to_spare,
  output logic          a_rec_evicted,
  output logic [LW-1:0] a_rec_evict_tag,
  output logic [W-1:0]  a_rec_data,
  output logic [W:0]    a_rec_err_mask,
  output logic [NARCH-1:0] a_in_spare,
  output logic          a_migrating,
  input  logic          a_inj_stuck_we,
  input  logic          a_inj_flip_we,
  input  logic          a_inj_bank,
  input  logic [LW-1:0] a_inj_addr,
  input  logic [W:0]    a_inj_mask,
  input  logic [W:0]    a_inj_value
);

  prf_protect #(.NPHYS(NPHYS), .NARCH(NARCH), .W(W), .NRD(NRD), .T(T)) u_prf (
    .clk, .rst_n,
    .ren_req(p_ren_req), .ren_arch(p_ren_arch), .ren_grant(p_ren_grant),
    .ren_preg(p_ren_preg), .ren_old(p_ren_old),
    .lk_arch(p_lk_arch), .lk_preg(p_lk_preg),
    .rel_en(p_rel_en), .rel_preg(p_rel_preg),
    .wr_en(p_wr_en), .wr_preg(p_wr_preg), .wr_data(p_wr_data),
    .rd_en(p_rd_en), .rd_preg(p_rd_preg), .rd_data(p_rd_data), .rd_err(p_rd_err),
    .stall(p_stall), .flush(p_flush), .rec_done(p_rec_done), .rec_result(p_rec_result),
    .rec_preg(p_rec_preg), .rec_new_preg(p_rec_new_preg), .rec_remapped(p_rec_remapped),
    .rec_rat_hit(p_rec_rat_hit), .rec_data(p_rec_data), .rec_err_mask(p_rec_err_mask),
    .free_count(p_free_count), .free_vec(p_free_vec), .vccmin_count(p_vccmin_count),
    .quarantined(p_quarantined), .vccmin_release(p_vccmin_release),
    .inj_stuck_we(p_inj_stuck_we), .inj_flip_we(p_inj_flip_we), .inj_addr(p_inj_addr),
    .inj_mask(p_inj_mask), .inj_value(p_inj_value)
  );

  arf_spare #(.NARCH(NARCH), .NSPARE(NSPARE), .W(W), .NRD(NRD), .T(T)) u_arf (
    .clk, .rst_n,
    .wr_en(a_wr_en), .wr_tag(a_wr_tag), .wr_data(a_wr_data),
    .rd_en(a_rd_en), .rd_tag(a_rd_tag), .rd_data(a_rd_data), .rd_bank(a_rd_bank),
    .rd_err(a_rd_err),
    .stall(a_stall), .flush(a_flush), .rec_done(a_rec_done), .rec_result(a_rec_result),
    .rec_tag(a_rec_tag), .rec_to_spare(a_rec_to_spare), .rec_evicted(a_rec_evicted),
    .rec_evict_tag(a_rec_evict_tag), .rec_data(a_rec_data), .rec_err_mask(a_rec_err_mask),
    .in_spare(a_in_spare), .migrating(a_migrating),
    .inj_stuck_we(a_inj_stuck_we), .inj_flip_we(a_inj_flip_we), .inj_bank(a_inj_bank),
    .inj_addr(a_inj_addr), .inj_mask(a_inj_mask), .inj_value(a_inj_value)
  );

endmodule
