// Shared types and default sizes for the erratic-bit protected register files.
//
// An erratic bit is an SRAM cell that behaves as a stuck-at-0 or stuck-at-1
// cell for a while (micro- to milliseconds) and then recovers. Values are kept
// with an even parity bit; when a read fails its parity check, a recovery
// sequence (erratic_recovery) tells an erratic bit from a soft error, restores
// the value when it can, and the faulty register is put in quarantine.
//
// The register count (128 integer physical registers) follows the evaluated
// core. The data width, the number of architectural registers, the number of
// spare registers and the quarantine period are choices of this design: the
// period is only known to be "in the order of millions" of cycles.
package erratic_pkg;

  localparam int unsigned DATA_W_DEF     = 64;         // value width, parity excluded
  localparam int unsigned PRF_REGS_DEF   = 128;        // integer physical registers
  localparam int unsigned ARCH_REGS_DEF  = 16;         // architectural integer registers
  localparam int unsigned SPARE_REGS_DEF = 4;          // spare registers (ARF organisation)
  localparam int unsigned QUARANTINE_DEF = 1_000_000;  // cycles between quarantine releases
  localparam int unsigned RD_PORTS_DEF   = 2;          // pipeline read ports

  // Outcome of one recovery sequence (the end states of the recovery flow).
  typedef enum logic [1:0] {
    REC_NONE    = 2'd0,  // no sequence has completed
    REC_OK      = 2'd1,  // re-read value passes the check: no error left
    REC_ERRATIC = 2'd2,  // stuck bit found: NOT(C) is the original value
    REC_SOFT    = 2'd3   // bit flip in the cell: not recoverable here
  } rec_result_t;

endpackage
