// patron_campaign: laser fault injection campaign against one patron_fsm
// instance, used by tb_patron_workloads.
//
// run() first walks the FSM through every logical state and reads back the
// code it stores, then checks the codebook against the encoding rules with
// its own arithmetic: all codes distinct, sensitive codes a positive multiple
// of x+1 apart, normal codes more than x away from every sensitive code, and
// the vulnerability metric |VS_x| / |S| equal to 0. Then, for every state and
// every pattern of 1..x flipped flip-flops, it forces the faulty code into
// the register and checks that the decoder never reports a sensitive state
// other than the one held. Results accumulate in checks, failures and the
// counters below; clk comes from the enclosing testbench.
module patron_campaign #(
  parameter int unsigned N_BITS  = 4,
  parameter int unsigned X_FLIPS = 1,
  parameter int unsigned NUM_SS  = 2,
  parameter int unsigned NUM_NS  = 4,
  parameter string       NAME    = "fsm"
) (
  input logic clk
);

  localparam int unsigned NUM_STATES = NUM_SS + NUM_NS;
  localparam int unsigned IDX_W      = (NUM_STATES <= 2) ? 1 : $clog2(NUM_STATES);

  logic              rst_n;
  logic [IDX_W-1:0]  next_state;
  logic [IDX_W-1:0]  state;
  logic [N_BITS-1:0] state_code;
  logic              is_sensitive, code_valid;

  patron_fsm #(.N_BITS(N_BITS), .X_FLIPS(X_FLIPS), .NUM_SS(NUM_SS), .NUM_NS(NUM_NS))
    dut (.clk(clk), .rst_n(rst_n), .next_state(next_state), .state(state),
         .state_code(state_code), .is_sensitive(is_sensitive), .code_valid(code_valid));

  int checks, failures;
  int n_fault_to_ns, n_fault_to_unused, n_vulnerable;
  logic [N_BITS-1:0] book [NUM_STATES];

  initial begin
    rst_n      = 1'b0;
    next_state = '0;
    checks = 0; failures = 0;
    n_fault_to_ns = 0; n_fault_to_unused = 0; n_vulnerable = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  task automatic run();
    logic [N_BITS-1:0] faulty;
    int tgt;
    bit vul;
    @(negedge clk);
    rst_n = 1'b1;
    // Read back the codebook.
    for (int s = 0; s < NUM_STATES; s++) begin
      @(negedge clk);
      next_state = IDX_W'(s);
      @(posedge clk);
      #1;
      book[s] = state_code;
      check(int'(state) == s && code_valid && is_sensitive == (s < NUM_SS),
            $sformatf("state %0d decoded as %0d", s, state));
    end
    // Encoding rules and vulnerability metric, computed here.
    for (int i = 0; i < NUM_STATES; i++) begin
      vul = 1'b0;
      for (int j = 0; j < NUM_STATES; j++) begin
        if (i != j) begin
          check(book[i] != book[j], $sformatf("codes %0d and %0d equal", i, j));
          if (j < NUM_SS && $countones(book[i] ^ book[j]) <= X_FLIPS) vul = 1'b1;
          if (i < NUM_SS && j < NUM_SS)
            check($countones(book[i] ^ book[j]) % (X_FLIPS + 1) == 0,
                  $sformatf("sensitive codes %0d, %0d not a multiple of x+1 apart", i, j));
        end
      end
      if (vul) n_vulnerable++;
    end
    check(n_vulnerable == 0, $sformatf("VM = %0d/%0d", n_vulnerable, NUM_STATES));
    // Attack: every state, every pattern of 1..x flips.
    for (int s = 0; s < NUM_STATES; s++) begin
      @(negedge clk);
      next_state = IDX_W'(s);
      @(posedge clk);
      #1;
      for (int e = 1; e < (1 << N_BITS); e++) begin
        if ($countones(e) <= X_FLIPS) begin
          faulty = book[s] ^ N_BITS'(e);
          force dut.code_q = faulty;
          #1;
          tgt = -1;
          for (int i = 0; i < NUM_STATES; i++) if (book[i] == faulty) tgt = i;
          check(!is_sensitive && !(tgt >= 0 && tgt < int'(NUM_SS)),
                $sformatf("state %0d flip %b reached a sensitive state", s, N_BITS'(e)));
          if (tgt >= 0) n_fault_to_ns++;
          else          n_fault_to_unused++;
          release dut.code_q;
          #1;
        end
      end
      // Restore the fault-free contents before moving on.
      @(negedge clk);
      next_state = IDX_W'(s);
      @(posedge clk);
    end
    $display("%-12s n=%0d x=%0d |SS|=%0d |NS|=%0d k=%0d CR=%0d/%0d VM=%0d/%0d faults: to_ns=%0d to_unused=%0d",
             NAME, N_BITS, X_FLIPS, NUM_SS, NUM_NS, $clog2(NUM_STATES), $clog2(NUM_STATES),
             N_BITS, n_vulnerable, NUM_STATES, n_fault_to_ns, n_fault_to_unused);
  endtask

endmodule
