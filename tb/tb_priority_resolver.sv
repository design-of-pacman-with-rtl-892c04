// tb_priority_resolver: checks vector selection order. Round robin (the
// default) must serve the active vectors in rotating order starting after
// the last one served; fixed priority must always pick the lowest active
// vector. Also checks that start follows an active vector by one cycle,
// that the base address of the chosen vector is passed on, that nothing
// starts while the controller is disabled or a vector is in service.
module tb_priority_resolver;
  localparam int V = 8;
  logic hclk = 0, hresetn = 0;
  logic [V-1:0] act;
  logic [V-1:0][31:0] ba;
  logic fixed, en, done;
  logic [2:0] sel;
  logic [31:0] sel_ba;
  logic start, in_service;
  int checks = 0, failures = 0;

  priority_resolver #(.NUM_VEC(V)) dut (.hclk, .hresetn, .active_int(act), .base_addr(ba),
    .fixed_prio(fixed), .enable(en), .exec_done(done), .sel_vec(sel), .sel_ba, .start, .in_service);

  always #5 hclk = ~hclk;

  task automatic expect_start(input int v, input string what);
    int cyc = 0;
    while (!start && cyc < 5) begin @(posedge hclk); #1; cyc++; end
    checks++;
    if (!start || sel != 3'(v) || sel_ba != ba[v]) begin
      failures++; $display("FAIL %s: start=%0d sel=%0d ba=%h expected vector %0d", what, start, sel, sel_ba, v);
    end
    checks++;
    if (cyc != 1) begin failures++; $display("FAIL %s: start after %0d cycles, expected 1", what, cyc); end
  endtask

  task automatic finish_vector();
    repeat (3) @(posedge hclk);
    #1; checks++;
    if (start) begin failures++; $display("FAIL start while in service"); end
    done = 1; @(posedge hclk); #1; done = 0;
  endtask

  int last;
  initial begin
    #200000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < V; v++) ba[v] = 32'h100 * v + 32'h40;
    act = '0; fixed = 0; en = 0; done = 0;
    repeat (3) @(posedge hclk); hresetn = 1;
    // disabled: nothing starts
    act = 8'b0000_0101; repeat (4) @(posedge hclk); #1;
    checks++; if (start || in_service) begin failures++; $display("FAIL started while disabled"); end
    // round robin over vectors 0, 2, 5 all active
    @(negedge hclk); en = 1; act = 8'b0010_0101;
    expect_start(0, "rr0"); finish_vector();
    expect_start(2, "rr1"); finish_vector();
    expect_start(5, "rr2"); finish_vector();
    expect_start(0, "rr3"); finish_vector();
    // random round robin against a reference
    last = 0;
    for (int t = 0; t < 40; t++) begin
      int expv;
      act = 8'($urandom) | 8'h1;
      expv = -1;
      for (int k = 1; k <= V; k++) if (expv < 0 && act[(last + k) % V]) expv = (last + k) % V;
      expect_start(expv, "rr random"); last = expv; finish_vector();
    end
    // fixed priority
    fixed = 1;
    for (int t = 0; t < 40; t++) begin
      int expv;
      act = 8'($urandom) | 8'h80;
      expv = -1;
      for (int k = 0; k < V; k++) if (expv < 0 && act[k]) expv = k;
      expect_start(expv, "fixed"); finish_vector();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
