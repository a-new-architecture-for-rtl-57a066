// enable_controller: starts, stops and restarts the configuration scan.
//
// A chain of SETTLE_STAGES flip-flops shifts in a constant 1 and is cleared by
// `resolved` (and by `rst`); its last stage, `settled`, says the configuration has had
// time to stabilise since the last (partial) configuration. A genuine fault is a
// fault seen while settled. `enable`, which lets the scan counter advance, is
// settled AND NOT fault AND NOT resolved: it falls in the same clock as a genuine
// fault, stays low while the fault is held by the detection stores, and comes back
// SETTLE_STAGES clocks after the Resolved pulse from the partial-reconfiguration
// controller. The two flip-flops fed by VDD and reset by Resolved follow the
// published drawing; the output equation follows its described behaviour. Driving `rst` while the
// device is not yet configured is this design's addition.
module enable_controller #(
  parameter int unsigned SETTLE_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic resolved,
  input  logic fault,
  output logic enable,
  output logic genuine_fault
);

  logic [SETTLE_STAGES-1:0] sr_q;
  logic settled;

  always_ff @(posedge clk) begin
    if (rst || resolved) sr_q <= '0;
    else                 sr_q <= {sr_q[SETTLE_STAGES-2:0], 1'b1};
  end

  assign settled       = sr_q[SETTLE_STAGES-1];
  assign genuine_fault = settled & fault;
  assign enable        = settled & ~genuine_fault & ~resolved;

endmodule
