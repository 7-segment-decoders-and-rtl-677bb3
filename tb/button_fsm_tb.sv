// Testbench for button_fsm: drives random button pairs and compares state
// and state_next with a reference model written as a transition table
// (state, l, r) -> next.
module button_fsm_tb;
  import timer_pkg::*;

  logic    clk = 1'b0, rst = 1'b1, l = 1'b0, r = 1'b0;
  bstate_t state, state_next, model;
  int checks = 0, failures = 0;
  int visits [4] = '{0, 0, 0, 0};

  button_fsm dut (.clk(clk), .rst(rst), .l(l), .r(r),
                  .state(state), .state_next(state_next));

  always #5 clk = ~clk;

  // Reference: index {state, l, r}.
  function automatic bstate_t ref_next(bstate_t s, logic lb, logic rb);
    bstate_t tbl [16] = '{
      // NB: 00 01 10 11
      NB, RB, LB, LB,
      // LB
      NB, BB, LB, BB,
      // RB
      NB, RB, BB, BB,
      // BB
      NB, BB, BB, BB};
    return tbl[{s, lb, rb}];
  endfunction

  initial begin
    @(posedge clk); #1;
    rst = 1'b0;
    model = NB;
    checks++;
    if (state !== NB) begin failures++; $display("FAIL: reset state %s", state.name()); end
    for (int i = 0; i < 2000; i++) begin
      // bias towards holding buttons so every state is visited often
      if ($urandom_range(0, 3) == 0) l = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 3) == 0) r = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (state !== model || state_next !== ref_next(model, l, r)) begin
        failures++;
        $display("FAIL: l=%b r=%b state=%s next=%s model=%s/%s", l, r,
                 state.name(), state_next.name(), model.name(),
                 ref_next(model, l, r).name());
      end
      visits[model]++;
      model = ref_next(model, l, r);
      @(posedge clk); #1;
    end
    foreach (visits[k]) begin
      checks++;
      if (visits[k] == 0) begin failures++; $display("FAIL: state %0d never visited", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
