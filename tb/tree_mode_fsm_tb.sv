// Self-checking testbench of tree_mode_fsm: pin-pair mode decode, complete
// and broken Mode Enable Vector chains, leaving TREE mode, random guessing,
// and the one-cycle grant latency. A second instance with 32-vector chains
// (the 128-state FSM of the size study) shares the inputs and must grant
// only after its 32nd vector.
module tree_mode_fsm_tb;
  import treehouse_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned SEQ_LEN = 12;
  localparam logic [63:0] SEED = 64'h1234_5678_9ABC_DEF0;

  logic clk = 1'b0, rst_n = 1'b1, tmr = 1'b0, wrstn = 1'b0, mev_valid = 1'b0;
  logic [15:0] mev = '0;
  wmode_e wmode; logic op_active; sec_op_e op; logic [31:0] mode_reg;
  logic op_active128; sec_op_e op128;
  int checks = 0, failures = 0;

  tree_mode_fsm #(.SEQ_LEN(SEQ_LEN), .MEV_SEED(SEED)) dut (
    .clk, .rst_n, .tree_mode_reset(tmr), .wrstn, .mev_valid, .mev, .wmode, .op_active, .op, .mode_reg);

  tree_mode_fsm #(.SEQ_LEN(32), .MEV_SEED(SEED)) dut128 (
    .clk, .rst_n, .tree_mode_reset(tmr), .wrstn, .mev_valid, .mev, .wmode(), .op_active(op_active128),
    .op(op128), .mode_reg());

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apply(input logic [15:0] v);
    @(negedge clk); mev_valid = 1'b1; mev = v;
    @(negedge clk); mev_valid = 1'b0;
  endtask

  task automatic run_chain(input int unsigned o, input int unsigned upto);
    for (int s = 0; s < int'(upto); s++) apply(ref_mev(SEED, o, s));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Mode decode.
    {tmr, wrstn} = 2'b00; #1 chk(wmode == WM_FUNCTIONAL, "functional decode");
    {tmr, wrstn} = 2'b01; #1 chk(wmode == WM_TEST, "test decode");
    {tmr, wrstn} = 2'b11; #1 chk(wmode == WM_ATSPEED, "at-speed decode");
    {tmr, wrstn} = 2'b10; #1 chk(wmode == WM_TREE, "TREE decode");
    chk(mode_reg[5:4] == 2'b10, "mode register shows TREE mode");
    // Vectors outside TREE mode are ignored.
    {tmr, wrstn} = 2'b01;
    run_chain(0, SEQ_LEN);
    chk(!op_active, "no grant outside TREE mode");
    {tmr, wrstn} = 2'b10;
    // Every chain grants its own operation; latency is one cycle.
    for (int o = 0; o < 4; o++) begin
      run_chain(o, SEQ_LEN - 1);
      chk(!op_active, "no grant before the last vector");
      @(negedge clk); mev_valid = 1'b1; mev = ref_mev(SEED, o, SEQ_LEN - 1);
      #1 chk(!op_active, "grant not before the clock edge");
      @(posedge clk); #1;
      chk(op_active && op == sec_op_e'(o), $sformatf("grant of op %0d one cycle after last vector", o));
      chk(mode_reg[1:0] == 2'b11 && mode_reg[3:2] == 2'(o), "KL_CTL/KL_STS = 11 and op field");
      @(negedge clk); mev_valid = 1'b0;
    end
    // A wrong vector inside a chain sends the FSM back to idle.
    apply(16'h0);
    chk(!op_active, "any vector ends a granted operation");
    run_chain(2, 5);
    apply(ref_mev(SEED, 2, 5) ^ 16'h0100);
    for (int s = 6; s < SEQ_LEN; s++) apply(ref_mev(SEED, 2, s));
    chk(!op_active, "broken chain is not granted");
    chk(mode_reg[1:0] == 2'b00, "progress is not visible in the Mode Register");
    run_chain(2, SEQ_LEN);
    chk(op_active && op == OP_FUNC_UNLOCK, "full chain after a broken one is granted");
    // Leaving TREE mode drops the grant.
    @(negedge clk); {tmr, wrstn} = 2'b01;
    @(negedge clk);
    chk(!op_active && wmode == WM_TEST, "grant dropped in test mode");
    {tmr, wrstn} = 2'b10;
    @(negedge clk);
    chk(!op_active, "grant not restored on return to TREE mode");
    // Random guessing never opens an operation.
    begin
      int grants = 0;
      for (int i = 0; i < 3000; i++) begin
        apply(16'($urandom));
        if (op_active) grants++;
      end
      chk(grants == 0, "random vectors never grant an operation");
    end
    // 128-state FSM: 4 chains of 32 vectors.
    {tmr, wrstn} = 2'b01; @(negedge clk); {tmr, wrstn} = 2'b10;
    for (int s = 0; s < 31; s++) apply(ref_mev(SEED, 2, s));
    chk(!op_active128, "128-state FSM: no grant after 31 vectors");
    apply(ref_mev(SEED, 2, 31));
    chk(op_active128 && op128 == OP_FUNC_UNLOCK, "128-state FSM: grant after the 32nd vector");
    chk(!op_active, "48-state FSM: a 32-vector run is not its chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
