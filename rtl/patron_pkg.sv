// patron_pkg: elaboration-time codebook generator for pragmatic (PATRON)
// FSM state encoding.
//
// A PATRON-encoded FSM splits its states into sensitive states (SS: the
// authorised and protected states) and normal states (NS). An attacker who can
// flip up to x state flip-flops in one clock cycle must not be able to turn
// any state into a sensitive one. The encoding therefore guarantees
//   - every pair of sensitive codes is a Hamming distance (HD) apart that is a
//     positive multiple of x+1, and
//   - every normal code is more than x away from every sensitive code.
// Normal codes may lie close to each other: a fault that moves the FSM from
// one normal state to another is allowed.
//
// The codes are picked greedily in increasing numeric order. Sensitive codes
// first: a value is taken when its distance to every sensitive code already
// taken is a multiple of x+1. Then the normal codes: a value is taken when it
// is more than x away from all sensitive codes (the set of Eq. 7 of the
// method, which the method builds as an AND of one BDD per sensitive state;
// here it is enumerated directly). For n = 4, x = 1 this yields the sensitive
// codes 0000, 0011 and normal candidates 0101, 0110, 1001, 1010, 1100, 1101,
// 1110, 1111, the worked example of the method.
//
// The greedy order and the search limit are this package's own choices. The
// search visits at most SCAN_LIMIT values per call so that it stays within
// what constant-function evaluation in common tools accepts; the codebooks
// of all the benchmark configurations are found well before that.
//
// Logical state numbering used by all modules: indices 0 .. NUM_SS-1 are the
// sensitive states, NUM_SS .. NUM_SS+NUM_NS-1 the normal states.
package patron_pkg;

  localparam int unsigned MAX_BITS   = 64;    // widest code supported
  localparam int unsigned MAX_STATES = 128;   // largest |SS| + |NS| supported
  localparam int unsigned SCAN_LIMIT = 16000; // code values visited per search

  typedef logic [MAX_BITS-1:0] code_t;

  // Hamming distance of two codes.
  function automatic int unsigned hd(code_t a, code_t b);
    return $countones(a ^ b);
  endfunction

  // Width of a logical state index for num_states states (at least 1).
  function automatic int unsigned idx_width(int unsigned num_states);
    return (num_states <= 2) ? 1 : $clog2(num_states);
  endfunction

  // Number of code values the search may visit for an n-bit code.
  function automatic int unsigned scan_bound(int unsigned n);
    if (n < 14 && (32'd1 << n) < SCAN_LIMIT) return 32'd1 << n;
    return SCAN_LIMIT;
  endfunction

  // What book_query returns.
  typedef enum logic [1:0] {
    Q_CODE,        // code of logical state idx
    Q_SS_FOUND,    // number of sensitive codes found (at most num_ss)
    Q_NS_FOUND,    // number of normal codes found (at most num_ns)
    Q_VULNERABLE   // |VS_x| of the codebook
  } query_e;

  // Builds the codebook for (n, x, num_ss, num_ns) and answers one query.
  // Constant functions may not have output arguments, so every question
  // about a codebook goes through this one function.
  function automatic code_t book_query(int unsigned n, int unsigned x,
                                       int unsigned num_ss, int unsigned num_ns,
                                       query_e q, int unsigned idx);
    code_t       ss [MAX_STATES];
    code_t       ns [MAX_STATES];
    int unsigned nss, nns, vul;
    bit          take;
    for (int unsigned i = 0; i < MAX_STATES; i++) begin
      ss[i] = '0;
      ns[i] = '0;
    end
    // Sensitive codes: pairwise distance a positive multiple of x+1.
    nss = 0;
    for (int unsigned v = 0; v < scan_bound(n) && nss < num_ss && nss < MAX_STATES; v++) begin
      take = 1'b1;
      for (int unsigned j = 0; j < nss; j++)
        if (hd(code_t'(v), ss[j]) % (x + 1) != 0) take = 1'b0;
      if (take) begin
        ss[nss] = code_t'(v);
        nss++;
      end
    end
    // Normal codes: more than x away from every sensitive code (Eq. 7).
    nns = 0;
    for (int unsigned v = 0; v < scan_bound(n) && nns < num_ns && nns < MAX_STATES; v++) begin
      take = 1'b1;
      for (int unsigned j = 0; j < nss; j++)
        if (hd(code_t'(v), ss[j]) <= x) take = 1'b0;
      if (take) begin
        ns[nns] = code_t'(v);
        nns++;
      end
    end
    case (q)
      Q_CODE:     return (idx < num_ss) ? ss[idx] : ns[idx - num_ss];
      Q_SS_FOUND: return code_t'(nss);
      Q_NS_FOUND: return code_t'(nns);
      default: begin
        // A state is vulnerable when at most x flips turn its code into the
        // code of another, sensitive state.
        vul = 0;
        for (int unsigned i = 0; i < nss + nns; i++) begin
          take = 1'b0;
          for (int unsigned j = 0; j < nss; j++)
            if (i != j && hd((i < nss) ? ss[i] : ns[i - nss], ss[j]) <= x) take = 1'b1;
          if (take) vul++;
        end
        return code_t'(vul);
      end
    endcase
  endfunction

  // Code of logical state idx (sensitive states first, then normal states).
  function automatic code_t state_code(int unsigned n, int unsigned x,
                                       int unsigned num_ss, int unsigned num_ns,
                                       int unsigned idx);
    return book_query(n, x, num_ss, num_ns, Q_CODE, idx);
  endfunction

  // 1 when an n-bit codebook with num_ss sensitive and num_ns normal codes
  // exists under this construction.
  function automatic bit codebook_fits(int unsigned n, int unsigned x,
                                       int unsigned num_ss, int unsigned num_ns);
    if (n == 0 || n > MAX_BITS || num_ss + num_ns > MAX_STATES) return 1'b0;
    return book_query(n, x, num_ss, num_ns, Q_SS_FOUND, 0) == code_t'(num_ss) &&
           book_query(n, x, num_ss, num_ns, Q_NS_FOUND, 0) == code_t'(num_ns);
  endfunction

  // |VS_x| of the codebook: the encoding is correct when it is 0.
  function automatic int unsigned vulnerable_states(int unsigned n, int unsigned x,
                                                    int unsigned num_ss,
                                                    int unsigned num_ns);
    return int'(book_query(n, x, num_ss, num_ns, Q_VULNERABLE, 0));
  endfunction

endpackage
