// column_encoder: the 256-to-8 encoder of the SEU detection controller.
//
// Encodes the per-column fault lines into the column (major) address handed to the
// partial-reconfiguration controller. When several columns fault at the same scan
// step the lowest-numbered one is reported (a priority choice of this design); the
// others are reported once that one is repaired and the scan resumes. `valid` is
// the OR of all inputs. Combinational.
module column_encoder #(
  parameter int unsigned NUM_COLS = seu_pkg::NUM_COLS,
  localparam int unsigned AW = $clog2(NUM_COLS)
) (
  input  logic [NUM_COLS-1:0] fault,
  output logic [AW-1:0]       addr,
  output logic                valid
);

  always_comb begin
    addr  = '0;
    valid = 1'b0;
    for (int i = NUM_COLS - 1; i >= 0; i--)
      if (fault[i]) begin
        addr  = AW'(i);
        valid = 1'b1;
      end
  end

endmodule
