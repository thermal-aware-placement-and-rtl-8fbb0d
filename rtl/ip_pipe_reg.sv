// ip_pipe_reg: the pipeline register between the PE counters and the
// reduction tree.
//
// It captures all M*N counter words when `load` (the clock2 edge, one cycle
// in L) is high, and holds them for the reduction tree while the counters
// already accumulate the next vector. `valid` is a one-cycle pulse in the
// cycle after a load, when `q` holds the new counts. Register and its place
// follow the source; the valid pulse is this design's choice.
module ip_pipe_reg #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) q <= d;
    end
  end

endmodule
