// dsm_delay: a plain pipeline delay of DEPTH clocks for a WIDTH-bit value.
//
// Used wherever a DSM algorithm says "delay X to the Nth clock tick": the
// value moves one register per clock, so it stays aligned with the data
// computed in parallel. DEPTH = 0 is a wire. Synchronous active-high reset
// clears every stage.
module dsm_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
