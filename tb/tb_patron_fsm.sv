// tb_patron_fsm: end-to-end test of the PATRON-encoded state register at its
// default parameters (n = 4 flip-flops, x = 1, sensitive codes 0000, 0011,
// normal codes 0101, 0110, 1001, 1010, reset into normal state 2).
//
// Phase 1 checks reset. Phase 2 drives 400 random next-state indices
// (including out-of-range ones) and compares state, code, code_valid and
// is_sensitive one clock later against a reference model. Phase 3 is the
// laser attack: for every state, every pattern of at most x flipped state
// flip-flops is forced into the register; the decoded state must never be a
// sensitive state other than the one held. Patterns of x+1 flips are also
// tried, to show the bound is tight (some of them do reach a sensitive code).
// Each mechanism (reset, entry into a sensitive state, normal-to-normal
// transition, out-of-range next state, fault into an unused code, fault out
// of a sensitive state, x+1 flips reaching a sensitive code) is counted and
// must occur. A single flip cannot move this codebook's normal states onto
// each other (they are 2 apart), so faults between normal states are counted
// but first required in tb_patron_workloads, whose larger codebooks have them.
module tb_patron_fsm;

  localparam int X = 1;

  int checks   = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] next_state;
  logic [2:0] state;
  logic [3:0] state_code;
  logic       is_sensitive, code_valid;

  patron_fsm dut (
    .clk(clk), .rst_n(rst_n), .next_state(next_state), .state(state),
    .state_code(state_code), .is_sensitive(is_sensitive), .code_valid(code_valid));

  always #5 clk = ~clk;

  logic [3:0] book [6] = '{4'b0000, 4'b0011, 4'b0101, 4'b0110, 4'b1001, 4'b1010};

  int n_reset, n_ss_entry, n_ns_to_ns, n_out_of_range;
  int n_fault_to_ns, n_fault_to_unused, n_fault_from_ss, n_wide_fault_to_ss;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected outputs for a register holding logical state s.
  task automatic expect_state(int s, string what);
    check(int'(state) == s && state_code == book[s] && code_valid &&
          is_sensitive == (s < 2),
          $sformatf("%s: state %0d code %b v%0d s%0d, expected state %0d",
                    what, state, state_code, code_valid, is_sensitive, s));
  endtask

  // Index of code c in the codebook, -1 when unused.
  function automatic int lookup(logic [3:0] c);
    for (int i = 0; i < 6; i++) if (book[i] == c) return i;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, prev_s, tgt;
    logic [3:0] faulty;

    // Phase 1: reset.
    rst_n      = 1'b0;
    next_state = 3'd2;
    repeat (2) @(posedge clk);
    #1;
    expect_state(2, "in reset");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;

    // Phase 2: functional transitions, one cycle of latency.
    exp_s = 2;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      next_state = 3'($urandom_range(0, 7));
      prev_s = exp_s;
      exp_s = (next_state < 3'd6) ? int'(next_state) : 2;
      expect_state(prev_s, "before edge");       // not yet updated
      @(posedge clk);
      #1;
      expect_state(exp_s, "after edge");
      if (next_state >= 3'd6) n_out_of_range++;
      else if (exp_s < 2 && prev_s >= 2) n_ss_entry++;
      else if (exp_s >= 2 && prev_s >= 2 && exp_s != prev_s) n_ns_to_ns++;
    end

    // Phase 3: laser fault injection into the state flip-flops.
    for (int s = 0; s < 6; s++) begin
      for (int e = 1; e < 16; e++) begin
        if ($countones(4'(e)) <= X + 1) begin
          @(negedge clk);
          next_state = 3'(s);
          @(posedge clk);
          #1;
          expect_state(s, "before fault");
          faulty = book[s] ^ 4'(e);
          force dut.code_q = faulty;
          #1;
          tgt = lookup(faulty);
          if ($countones(4'(e)) <= X) begin
            // Within the attacker's budget: never a (different) sensitive state.
            check(!is_sensitive && !(tgt >= 0 && tgt < 2),
                  $sformatf("state %0d flip %b reached sensitive code %b", s, 4'(e), faulty));
            if (tgt >= 2) begin
              check(code_valid && int'(state) == tgt && s >= 2,
                    $sformatf("state %0d flip %b -> %b decoded %0d", s, 4'(e), faulty, state));
              n_fault_to_ns++;
            end else begin
              check(!code_valid && state == 3'd2,
                    $sformatf("state %0d flip %b unused code decoded %0d v%0d",
                              s, 4'(e), state, code_valid));
              n_fault_to_unused++;
            end
            if (s < 2) n_fault_from_ss++;
          end else if (tgt >= 0 && tgt < 2 && s >= 2) begin
            check(is_sensitive && int'(state) == tgt,
                  $sformatf("x+1 flips %b: decode of sensitive code", faulty));
            n_wide_fault_to_ss++;
          end
          // The fault stays in the register until the next clock edge.
          @(negedge clk);
          release dut.code_q;
          check(state_code == faulty, "fault did not persist until next edge");
        end
      end
    end

    check(n_reset > 0,            "mechanism never seen: reset");
    check(n_ss_entry > 0,         "mechanism never seen: entry into sensitive state");
    check(n_ns_to_ns > 0,         "mechanism never seen: normal-to-normal transition");
    check(n_out_of_range > 0,     "mechanism never seen: out-of-range next state");
    check(n_fault_to_unused > 0,  "mechanism never seen: fault into unused code");
    check(n_fault_from_ss > 0,    "mechanism never seen: fault out of sensitive state");
    check(n_wide_fault_to_ss > 0, "mechanism never seen: x+1 flips reaching a sensitive code");
    $display("mechanisms: reset=%0d ss_entry=%0d ns_to_ns=%0d out_of_range=%0d",
             n_reset, n_ss_entry, n_ns_to_ns, n_out_of_range);
    $display("faults (<=x flips): to_ns=%0d to_unused=%0d from_ss=%0d; x+1 flips to ss=%0d",
             n_fault_to_ns, n_fault_to_unused, n_fault_from_ss, n_wide_fault_to_ss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
