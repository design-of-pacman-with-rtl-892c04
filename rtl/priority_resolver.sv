// priority_resolver: chooses which active vector the execution unit serves
// next and starts it at that vector's base address.
//
// While the controller is enabled and no vector is in service, the resolver
// looks at Active_Int[NUM_VEC-1:0]. In round-robin mode (the default) the
// search starts at the vector after the one served last; in fixed-priority
// mode vector 0 is the highest and vector NUM_VEC-1 the lowest priority. The
// winner is registered as Selected_Active_Interrupt (sel_vec) with its base
// address (sel_ba), and start pulses for one cycle. The vector stays in
// service until the execution unit reports END (exec_done); an execution
// unit stuck in its error state keeps it in service.
//
// Timing: start follows an active line by one cycle when idle; a new vector
// can start one cycle after exec_done.
//
// Round-robin default, programmable fixed priority and handing over the base
// address follow the document; the one-vector-at-a-time handshake is this
// design's choice.
module priority_resolver #(
  parameter int unsigned NUM_VEC = 8
) (
  input  logic                            hclk,
  input  logic                            hresetn,
  input  logic [NUM_VEC-1:0]              active_int,
  input  logic [NUM_VEC-1:0][31:0]        base_addr,
  input  logic                            fixed_prio,
  input  logic                            enable,
  input  logic                            exec_done,
  output logic [$clog2(NUM_VEC)-1:0]      sel_vec,
  output logic [31:0]                     sel_ba,
  output logic                            start,
  output logic                            in_service
);

  localparam int unsigned VW = $clog2(NUM_VEC);

  logic [VW-1:0] last, pick;
  logic          found;

  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < NUM_VEC; k++) begin
      automatic int unsigned v = fixed_prio ? k : (int'(last) + 1 + k) % NUM_VEC;
      if (!found && active_int[v]) begin
        pick  = VW'(v);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      last       <= VW'(NUM_VEC - 1);   // round robin starts at vector 0
      sel_vec    <= '0;
      sel_ba     <= '0;
      start      <= 1'b0;
      in_service <= 1'b0;
    end else begin
      start <= 1'b0;
      if (in_service) begin
        if (exec_done) begin
          in_service <= 1'b0;
          last       <= sel_vec;
        end
      end else if (enable && found) begin
        sel_vec    <= pick;
        sel_ba     <= base_addr[pick];
        start      <= 1'b1;
        in_service <= 1'b1;
      end
    end
  end

endmodule
