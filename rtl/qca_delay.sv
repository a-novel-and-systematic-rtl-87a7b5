// Clocked QCA wire: a WIDTH-bit signal delayed by DEPTH clock sequences.
//
// A wire in a clocked QCA layout passes through clock zones, so a path that
// crosses a whole clock sequence holds its value for one cycle, like a
// register. This shift register is used to balance paths inside a gate so
// that all of its outputs appear together, and to make a gate's total
// latency equal to that of its layout. DEPTH = 0 is a plain connection.
// Registers clear on the active-low asynchronous reset.
module qca_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
