// Free list of physical registers, kept as one bit per register.
//
// The rename stage takes registers from it and commit returns them; the
// quarantine list (vccmin_list) hands back all its registers at once through
// bulk_vec. Allocation picks the lowest-numbered free register and is
// combinational: alloc_valid/alloc_id describe the register a pulse on
// alloc_en takes at the next clock edge. Registers 0..INIT_USED-1 are in use
// after reset (they hold the initial architectural mapping), the rest are
// free. Returning a register that is already free has no effect. A register
// allocated and returned in the same cycle ends up free.
// The scheme only says the quarantine list works like the regular free list;
// the bit-vector form and lowest-first choice are this design's own.
module free_list #(
  parameter int unsigned N         = 128,
  parameter int unsigned INIT_USED = 16,
  localparam int unsigned AW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_en,
  output logic          alloc_valid,
  output logic [AW-1:0] alloc_id,
  input  logic          rel_en,
  input  logic [AW-1:0] rel_id,
  input  logic [N-1:0]  bulk_vec,
  output logic [N-1:0]  free_vec,
  output logic [AW:0]   free_count
);

  always_comb begin
    alloc_valid = 1'b0;
    alloc_id    = '0;
    for (int i = N - 1; i >= 0; i--)
      if (free_vec[i]) begin
        alloc_valid = 1'b1;
        alloc_id    = AW'(i);
      end
  end

  always_comb begin
    free_count = '0;
    for (int i = 0; i < N; i++) free_count += (AW + 1)'(free_vec[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) free_vec[i] <= (i >= INIT_USED);
    end else begin
      logic [N-1:0] nxt;
      nxt = free_vec | bulk_vec;
      if (alloc_en && alloc_valid) nxt[alloc_id] = 1'b0;
      if (rel_en) nxt[rel_id] = 1'b1;
      free_vec <= nxt;
    end
  end

endmodule
