// Quarantine list ("vccmin list") for registers with erratic bits.
//
// A register found to have an erratic bit is added here instead of being
// returned to the free list. Because erratic bits come and go, the list is
// not permanent: a free-running counter emits, every T cycles, a one-cycle
// pulse on release with the whole list on release_vec, and the list is
// emptied. The receiver (the free list) takes all those registers back; if a
// register is still faulty the recovery sequence will catch and quarantine it
// again. A register added in the cycle of a release stays in the list for the
// next period. The release period is given only as "every T cycles (in the
// order of millions)"; T = 1,000,000 is this design's default.
module vccmin_list #(
  parameter int unsigned N = 128,
  parameter int unsigned T = 1_000_000,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          add_en,
  input  logic [AW-1:0] add_id,
  output logic [N-1:0]  q_vec,        // registers in quarantine
  output logic          release_pulse,
  output logic [N-1:0]  release_vec,  // valid with release_pulse
  output logic [AW:0]   count
);

  logic [CW-1:0] timer;
  logic          wrap;

  always_comb wrap = (timer == CW'(T - 1));

  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count += (AW + 1)'(q_vec[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer         <= '0;
      q_vec         <= '0;
      release_pulse <= 1'b0;
      release_vec   <= '0;
    end else begin
      logic [N-1:0] nxt;
      timer         <= wrap ? '0 : timer + 1'b1;
      release_pulse <= wrap;
      release_vec   <= wrap ? q_vec : '0;
      nxt = wrap ? '0 : q_vec;
      if (add_en) nxt[add_id] = 1'b1;
      q_vec <= nxt;
    end
  end

endmodule
