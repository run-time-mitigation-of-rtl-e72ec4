// crossbar: N_PORTS x N_PORTS switch. Output o carries the flit of input
// sel[o]. Which outputs are written is decided by the arbiter through the
// output FIFO push signals, so the crossbar itself is a bank of multiplexers.
// Purely combinational.
module crossbar #(
  parameter int N_PORTS = noc_pkg::N_PORTS,
  parameter int WIDTH   = noc_pkg::IFLIT_W
) (
  input  logic [N_PORTS-1:0][WIDTH-1:0]             in_flit,
  input  logic [N_PORTS-1:0][$clog2(N_PORTS)-1:0]   sel,
  output logic [N_PORTS-1:0][WIDTH-1:0]             out_flit
);
  always_comb
    for (int o = 0; o < N_PORTS; o++)
      out_flit[o] = (int'(sel[o]) < N_PORTS) ? in_flit[sel[o]] : '0;
endmodule
