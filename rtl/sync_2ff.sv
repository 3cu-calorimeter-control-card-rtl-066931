// sync_2ff: two-flop synchronizer for a bus of independent asynchronous
// levels (backplane lines read by the FPGA). Each bit is synchronized on its
// own; the bus as a whole is not coherent. RESET_VAL is the level the flops
// take during reset, chosen so that a released line reads as its idle level.
// Output latency: two clk cycles.
module sync_2ff #(
  parameter int unsigned WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q_o  <= RESET_VAL;
    end else begin
      meta <= d_i;
      q_o  <= meta;
    end
  end

endmodule
