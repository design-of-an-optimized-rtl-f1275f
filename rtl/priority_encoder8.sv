// priority_encoder8: 8:3 priority encoder, code = index of the highest set
// request (request 7 has the highest priority). With no request set the
// code is 0, the same as request 0 alone. Combinational.
module priority_encoder8 (
  input  logic [7:0] req,
  output logic [2:0] code
);
  always_comb begin
    code = 3'd0;
    for (int i = 0; i < 8; i++)
      if (req[i]) code = 3'(i);
  end
endmodule
