// patron_fsm: state register of an FSM protected with pragmatic (PATRON)
// encoding against laser fault injection.
//
// The FSM's own next-state logic works on logical state indices and drives
// next_state. The index is encoded into an N_BITS-wide code, stored in
// N_BITS flip-flops, and the flip-flop contents are decoded back into the
// logical index `state` for the FSM's next-state and output logic. The
// codebook keeps every normal code more than X_FLIPS bit flips away from all
// sensitive codes, and the sensitive codes a multiple of X_FLIPS+1 apart, so
// an attacker who flips up to X_FLIPS flip-flops in one cycle can move a
// normal state only to another normal state or to an unused code, never into
// a sensitive state, and cannot move one sensitive state into another.
// Nothing detects or corrects faults; the protection is the encoding alone.
//
// Defaults are the method's worked example: 4 flip-flops, x = 1, two
// sensitive states (codes 0000 and 0011) and four normal states (0101, 0110,
// 1001, 1010), i.e. six states that binary would hold in 3 flip-flops
// (code rate 3/4). The next-state and output logic of a real controller is
// outside this module.
//
// This design's own choices: asynchronous active-low reset into RESET_STATE
// (a normal state by default); out-of-range next_state and unused codes map
// to RESET_STATE; elaboration stops if the codebook cannot be built or has a
// vulnerable state.
//
// Ports: clk, rst_n, next_state (IDX_W) in; state (IDX_W), state_code
// (N_BITS, the raw flip-flops), is_sensitive, code_valid out.
//
// Timing: next_state is sampled at each rising clock edge; state, is_sensitive,
// code_valid and state_code follow combinationally from the register.
module patron_fsm #(
  parameter int unsigned N_BITS      = 4,
  parameter int unsigned X_FLIPS     = 1,
  parameter int unsigned NUM_SS      = 2,
  parameter int unsigned NUM_NS      = 4,
  parameter int unsigned RESET_STATE = NUM_SS,
  localparam int unsigned NUM_STATES = NUM_SS + NUM_NS,
  localparam int unsigned IDX_W      = patron_pkg::idx_width(NUM_STATES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IDX_W-1:0]  next_state,
  output logic [IDX_W-1:0]  state,
  output logic [N_BITS-1:0] state_code,
  output logic              is_sensitive,
  output logic              code_valid
);

  if (patron_pkg::vulnerable_states(N_BITS, X_FLIPS, NUM_SS, NUM_NS) != 0) begin : g_check
    $error("patron_fsm: codebook has vulnerable states");
  end

  localparam patron_pkg::code_t RESET_CODE =
    patron_pkg::state_code(N_BITS, X_FLIPS, NUM_SS, NUM_NS, RESET_STATE);

  logic [N_BITS-1:0] next_code;
  // The register must keep exactly these codes: a synthesis tool that
  // extracts and re-encodes FSMs would undo the protection.
  (* fsm_encoding = "none" *)
  logic [N_BITS-1:0] code_q;

  patron_encoder #(
    .N_BITS(N_BITS), .X_FLIPS(X_FLIPS), .NUM_SS(NUM_SS), .NUM_NS(NUM_NS),
    .SAFE_STATE(RESET_STATE)
  ) u_enc (
    .state_idx(next_state),
    .code     (next_code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code_q <= RESET_CODE[N_BITS-1:0];
    else        code_q <= next_code;
  end

  patron_decoder #(
    .N_BITS(N_BITS), .X_FLIPS(X_FLIPS), .NUM_SS(NUM_SS), .NUM_NS(NUM_NS),
    .SAFE_STATE(RESET_STATE)
  ) u_dec (
    .code      (code_q),
    .state_idx (state),
    .is_sensitive(is_sensitive),
    .code_valid(code_valid)
  );

  assign state_code = code_q;

endmodule
