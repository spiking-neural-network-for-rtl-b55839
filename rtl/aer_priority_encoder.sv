// aer_priority_encoder: picks the next address to send on the AER bus.
//
// Returns the index of the highest-numbered set bit of vec and whether any
// bit is set.  Highest-first is the order of the document's AER timeline
// (spikes of neurons 0, 1, 3 and 4 leave the bus as 4, 3, 1, 0).  Purely
// combinational.
module aer_priority_encoder #(
  parameter int unsigned N  = 47,
  parameter int unsigned AW = 6
) (
  input  logic [N-1:0]  vec,
  output logic          valid,
  output logic [AW-1:0] idx
);

  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (vec[k]) begin
        valid = 1'b1;
        idx   = AW'(k);
      end
    end
  end

endmodule
