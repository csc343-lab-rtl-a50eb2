// decoder: binary to one-hot decoder (2:4 at the default width). Output bit k
// is 1 exactly when the input equals k. Purely combinational. Output k
// selects register k (register numbers 00..11), as in the lab circuit.
module decoder #(
  parameter int unsigned IN_W = 2
) (
  input  logic [IN_W-1:0]      i,
  output logic [(1<<IN_W)-1:0] o
);
  always_comb begin
    o = '0;
    o[i] = 1'b1;
  end
endmodule
