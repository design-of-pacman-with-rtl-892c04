// tb_int_router: checks the interrupt router at its full size (128 lines,
// 8 vectors) with random lines, enables and routing bits against a
// reference computed line by line, plus directed cases: a disabled line is
// ignored and each vector can be reached.
module tb_int_router;
  localparam int N = 128, V = 8;
  logic [N-1:0]        irq, en;
  logic [N-1:0][2:0]   route;
  logic [V-1:0]        act, ref_act;
  int checks = 0, failures = 0;

  int_router #(.NUM_IRQ(N), .NUM_VEC(V)) dut (.irq_i(irq), .irq_en(en), .irq_route(route), .active_int(act));

  task automatic check(input string what);
    ref_act = '0;
    for (int n = 0; n < N; n++) if (irq[n] && en[n]) ref_act[route[n]] = 1'b1;
    #1;
    checks++;
    if (act !== ref_act) begin
      failures++;
      $display("FAIL %s: act=%b expected %b", what, act, ref_act);
    end
  endtask

  initial begin
    #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // one line to every vector
    for (int v = 0; v < V; v++) begin
      irq = '0; en = '0; route = '0;
      irq[v*16+3] = 1'b1; en[v*16+3] = 1'b1; route[v*16+3] = 3'(v);
      #1; checks++;
      if (act !== V'(1 << v)) begin failures++; $display("FAIL vector %0d: %b", v, act); end
    end
    // disabled line
    irq = '0; en = '0; route = '0; irq[127] = 1'b1; route[127] = 3'd5;
    #1; checks++; if (act !== '0) begin failures++; $display("FAIL disabled line seen"); end
    // random
    for (int t = 0; t < 500; t++) begin
      for (int n = 0; n < N; n++) begin
        irq[n]   = ($urandom % 8) == 0;
        en[n]    = $urandom % 2;
        route[n] = 3'($urandom);
      end
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
