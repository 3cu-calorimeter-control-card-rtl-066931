// reset_sync: asynchronous assertion, synchronous release of an active-low
// reset for one clock domain. rst_no goes low at once with rst_ni and rises
// on the second rising edge of clk after rst_ni has risen.
module reset_sync (
  input  logic clk,
  input  logic rst_ni,
  output logic rst_no
);

  logic stage;

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      stage  <= 1'b0;
      rst_no <= 1'b0;
    end else begin
      stage  <= 1'b1;
      rst_no <= stage;
    end
  end

endmodule
