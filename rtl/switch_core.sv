// Switch core: a distributed multiplexer between four electrical ports and
// sixty-four optical paths.
//
// Every optical path crosses one 2x2 switch per electrical port, in port
// order A, B, C, D. A 2x2 switch whose control bit is set replaces the word
// travelling along the path by the word of its port; otherwise it passes the
// path word on. Each electrical port therefore reaches all 64 paths, and each
// path output carries either its own input (flow-through around the ring) or
// the word of the last port in the chain that selects it. The electrical
// output ports receive only the first four optical input paths: PATH 0 goes
// to PORT A, PATH 1 to PORT B and so on. For initialization, two loop-back
// selects can instead route the PORT A input or the PATH 0 input to PORT B.
//
// Timing: the words are retimed by a register at the core input and again at
// the core output, so a word leaves two clock cycles after it enters. The
// optical inputs come from another clock domain and their input register is a
// phase_sync with the host-selected 0/180 degree capture phase (cps).
//
// Interface: ctrl[p][k] = 1 connects electrical port p to optical path k.
// The chain of 2x2 switches, the per-port control registers, the PATH n to
// PORT n wiring and the two retiming stages follow the document. Which port
// wins when several select one path (the last in the chain, D) and the
// loop-back routing are choices of this design.
module switch_core #(
  parameter int unsigned NPATH = 64,
  parameter int unsigned NPORT = 4,
  parameter int unsigned DW    = 24
) (
  input  logic                            clk,
  input  logic                            cps,        // 180 degree capture of optical inputs
  input  logic [NPATH-1:0][DW-1:0]        path_in,    // optical inputs (optical clock domain)
  input  logic [NPORT-1:0][DW-1:0]        port_in,    // electrical inputs
  input  logic [NPORT-1:0][NPATH-1:0]     ctrl,       // 2x2 switch controls
  input  logic                            lb_port,    // loop back PORT A input to PORT B output
  input  logic                            lb_path0,   // loop back PATH 0 input to PORT B output
  output logic [NPATH-1:0][DW-1:0]        path_out,
  output logic [NPORT-1:0][DW-1:0]        port_out
);

  logic [NPATH-1:0][DW-1:0] path_q;
  logic [NPORT-1:0][DW-1:0] port_q;
  logic [NPATH-1:0][DW-1:0] path_mux;
  logic [NPORT-1:0][DW-1:0] port_mux;

  // Input retiming: optical paths cross into the internal clock domain.
  phase_sync #(.W(NPATH*DW)) u_path_sync (
    .clk    (clk),
    .sel_180(cps),
    .d      (path_in),
    .q      (path_q)
  );

  always_ff @(posedge clk) port_q <= port_in;

  // Chain of 2x2 switches along each path.
  always_comb begin
    for (int k = 0; k < NPATH; k++) begin
      path_mux[k] = path_q[k];
      for (int p = 0; p < NPORT; p++) begin
        if (ctrl[p][k]) path_mux[k] = port_q[p];
      end
    end
  end

  // Electrical outputs: PATH n feeds PORT n, with the loop-back selects on PORT B.
  always_comb begin
    for (int p = 0; p < NPORT; p++) port_mux[p] = path_q[p];
    if (NPORT > 1) begin
      if (lb_path0)     port_mux[1] = path_q[0];
      else if (lb_port) port_mux[1] = port_q[0];
    end
  end

  // Output retiming.
  always_ff @(posedge clk) begin
    path_out <= path_mux;
    port_out <= port_mux;
  end

endmodule
