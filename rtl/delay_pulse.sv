`timescale 1ps/10fs
// delay_pulse: behavioural model of the DELAY PULSE chain of the differential
// delay TDC. This is a behavioural model, not synthesizable logic: the real part
// is nine inverters of 11 ps each, tapped at every node.
//
// tap[k] is the input pulse delayed by k*11 ps (k = 0..9). Because every stage
// inverts, odd taps carry the inverted pulse; the odd sub-TDCs undo this with an
// inverting input on their switch. Stage count, 11 ps delay and tap naming
// follow the document; the delays are transport delays here.
module delay_pulse #(
  parameter int unsigned TAPS     = 10,
  parameter real         STAGE_PS = 11.0
) (
  input  logic            pulse,
  output logic [TAPS-1:0] tap
);

  // Rest state with the input low: every odd node is high.
  localparam logic [TAPS-1:0] REST = TAPS'({(TAPS + 1) / 2{2'b10}});

  logic [TAPS-1:0] node;

  initial node = REST;

  assign tap = node;

  always @(pulse) node[0] = pulse;

  for (genvar k = 1; k < TAPS; k++) begin : g_inv
    always @(node[k-1]) node[k] <= #(STAGE_PS) ~node[k-1];
  end

endmodule
