// Register alias table (rename table) with a remap port.
//
// Maps each architectural register to its current physical register. After
// reset architectural register i maps to physical register i. Lookups are
// combinational (NRD ports); a rename write (ren_we) takes effect at the next
// edge and reports the mapping it replaces on ren_old (combinational).
// Remap: when a physical register is found to hold an erratic bit its value
// is moved to a newly allocated register, and every entry that points to the
// old register (remap_old) is redirected to remap_new; remap_hit tells
// whether any entry pointed to it (the remap happens "only if needed").
// A remap in the same cycle as a rename of the same entry wins.
// The scheme names the table and the remap step only; the search-and-replace
// form is this design's own.
module rat #(
  parameter int unsigned NARCH = 16,
  parameter int unsigned NPHYS = 128,
  parameter int unsigned NRD   = 2,
  localparam int unsigned LW   = (NARCH > 1) ? $clog2(NARCH) : 1,
  localparam int unsigned PW   = (NPHYS > 1) ? $clog2(NPHYS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] lk_arch [NRD],
  output logic [PW-1:0] lk_preg [NRD],
  input  logic          ren_we,
  input  logic [LW-1:0] ren_arch,
  input  logic [PW-1:0] ren_preg,
  output logic [PW-1:0] ren_old,
  input  logic          remap_en,
  input  logic [PW-1:0] remap_old,
  input  logic [PW-1:0] remap_new,
  output logic          remap_hit
);

  logic [PW-1:0] map [NARCH];

  always_comb begin
    for (int p = 0; p < NRD; p++) lk_preg[p] = map[lk_arch[p]];
    ren_old   = map[ren_arch];
    remap_hit = 1'b0;
    for (int i = 0; i < NARCH; i++)
      if (map[i] == remap_old) remap_hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NARCH; i++) map[i] <= PW'(i);
    end else begin
      for (int i = 0; i < NARCH; i++) begin
        if (remap_en && map[i] == remap_old)
          map[i] <= remap_new;
        else if (ren_we && ren_arch == LW'(i))
          map[i] <= ren_preg;
      end
    end
  end

endmodule
