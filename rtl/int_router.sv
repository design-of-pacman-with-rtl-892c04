// int_router: the interrupt router. Each of the NUM_IRQ input lines has a
// router block: the line is ANDed with its enable bit and steered by its
// three routing bits to one of NUM_VEC vector outputs. For each vector an
// N:1 OR gate combines what all lines route to it into Active_Int[v].
//
// Purely combinational. Lines are active-high and level-sensitive. The
// enable AND, the routing demultiplexer and the per-vector OR gates follow
// the document's router diagram.
module int_router #(
  parameter int unsigned NUM_IRQ = 128,
  parameter int unsigned NUM_VEC = 8
) (
  input  logic [NUM_IRQ-1:0]                       irq_i,
  input  logic [NUM_IRQ-1:0]                       irq_en,
  input  logic [NUM_IRQ-1:0][$clog2(NUM_VEC)-1:0]  irq_route,
  output logic [NUM_VEC-1:0]                       active_int
);

  // Int<n>_route_<v>: line n as seen by vector v
  logic [NUM_IRQ-1:0][NUM_VEC-1:0] int_route;

  always_comb begin
    for (int n = 0; n < NUM_IRQ; n++)
      for (int v = 0; v < NUM_VEC; v++)
        int_route[n][v] = irq_i[n] && irq_en[n] && (32'(irq_route[n]) == v);
  end

  always_comb begin
    active_int = '0;
    for (int n = 0; n < NUM_IRQ; n++) active_int |= int_route[n];
  end

endmodule
