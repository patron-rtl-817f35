// patron_decoder: PATRON state code -> logical state index.
//
// Compares the contents of the state flip-flops with every code of the
// codebook built by patron_pkg (same parameters as patron_encoder). On an
// exact match it returns the state's index, raises code_valid, and raises
// is_sensitive when the index is one of the NUM_SS sensitive states.
//
// A code outside the codebook (a don't-care code, reachable only through a
// fault) decodes to SAFE_STATE, a normal state, with code_valid low and
// is_sensitive low. The method leaves unused codes unspecified; decoding them
// to a normal state is this design's choice. It matters: several unused codes
// lie within x flips of a sensitive code, and a decoder that let them alias to
// a sensitive state (as free don't-care optimisation may) would reopen the
// path the encoding closes. Nothing here corrects or reports faults beyond
// the code_valid flag.
//
// Ports: code (N_BITS) in; state_idx (IDX_W), is_sensitive, code_valid
// out.
// Purely combinational.
module patron_decoder #(
  parameter int unsigned N_BITS     = 4,
  parameter int unsigned X_FLIPS    = 1,
  parameter int unsigned NUM_SS     = 2,
  parameter int unsigned NUM_NS     = 4,
  parameter int unsigned SAFE_STATE = NUM_SS,
  localparam int unsigned NUM_STATES = NUM_SS + NUM_NS,
  localparam int unsigned IDX_W      = patron_pkg::idx_width(NUM_STATES)
) (
  input  logic [N_BITS-1:0] code,
  output logic [IDX_W-1:0]  state_idx,
  output logic              is_sensitive,
  output logic              code_valid
);

  if (SAFE_STATE < NUM_SS || SAFE_STATE >= NUM_STATES) begin : g_safe_check
    $error("patron_decoder: SAFE_STATE must be a normal state");
  end

  logic [N_BITS-1:0] table_q [NUM_STATES];

  for (genvar i = 0; i < NUM_STATES; i++) begin : g_code
    localparam patron_pkg::code_t C =
      patron_pkg::state_code(N_BITS, X_FLIPS, NUM_SS, NUM_NS, i);
    assign table_q[i] = C[N_BITS-1:0];
  end

  always_comb begin
    state_idx  = IDX_W'(SAFE_STATE);
    is_sensitive = 1'b0;
    code_valid = 1'b0;
    for (int unsigned i = 0; i < NUM_STATES; i++) begin
      if (code == table_q[i]) begin
        state_idx  = IDX_W'(i);
        is_sensitive = (i < NUM_SS);
        code_valid = 1'b1;
      end
    end
  end

endmodule
