// patron_encoder: logical state index -> PATRON state code.
//
// Combinational lookup into the codebook that patron_pkg builds at
// elaboration from the code width N_BITS, the attacker's flip budget X_FLIPS
// and the numbers of sensitive (NUM_SS) and normal (NUM_NS) states. Indices
// 0 .. NUM_SS-1 select sensitive codes, the following NUM_NS indices normal
// codes. The codebook construction follows the pragmatic encoding rules
// (sensitive codes a multiple of x+1 apart, normal codes more than x away
// from every sensitive code); the greedy order is this design's own.
//
// An index outside the codebook is encoded as SAFE_STATE, which must be a
// normal state, so that a bad next-state value can never produce a sensitive
// code; that rule is this design's own choice.
//
// Ports: state_idx (IDX_W bits) in, code (N_BITS bits) out. No clock; the
// path is one level of decode and a wide OR.
module patron_encoder #(
  parameter int unsigned N_BITS     = 4,
  parameter int unsigned X_FLIPS    = 1,
  parameter int unsigned NUM_SS     = 2,
  parameter int unsigned NUM_NS     = 4,
  parameter int unsigned SAFE_STATE = NUM_SS,
  localparam int unsigned NUM_STATES = NUM_SS + NUM_NS,
  localparam int unsigned IDX_W      = patron_pkg::idx_width(NUM_STATES)
) (
  input  logic [IDX_W-1:0]  state_idx,
  output logic [N_BITS-1:0] code
);

  if (!patron_pkg::codebook_fits(N_BITS, X_FLIPS, NUM_SS, NUM_NS)) begin : g_fit_check
    $error("patron_encoder: no %0d-bit codebook for x=%0d, |SS|=%0d, |NS|=%0d",
           N_BITS, X_FLIPS, NUM_SS, NUM_NS);
  end
  if (SAFE_STATE < NUM_SS || SAFE_STATE >= NUM_STATES) begin : g_safe_check
    $error("patron_encoder: SAFE_STATE must be a normal state");
  end

  logic [N_BITS-1:0] table_q [NUM_STATES];

  for (genvar i = 0; i < NUM_STATES; i++) begin : g_code
    localparam patron_pkg::code_t C =
      patron_pkg::state_code(N_BITS, X_FLIPS, NUM_SS, NUM_NS, i);
    assign table_q[i] = C[N_BITS-1:0];
  end

  always_comb begin
    code = table_q[SAFE_STATE];
    for (int unsigned i = 0; i < NUM_STATES; i++)
      if (int'(state_idx) == int'(i)) code = table_q[i];
  end

endmodule
