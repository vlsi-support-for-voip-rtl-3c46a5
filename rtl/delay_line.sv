// Delay line: a chain of DEPTH registers, the "nD" circles of the BDN drawing.
// DEPTH = 0 is a plain wire. The word is WIDTH bits; the chain is reset to RST_VAL so
// that control bits are defined from the first clock. With DEPTH = 0 the clock and
// reset inputs are left unused on purpose, so that every chain has the same ports.
module delay_line #(
  parameter int unsigned          DEPTH   = 1,
  parameter int unsigned          WIDTH   = 1,
  parameter logic [WIDTH-1:0]     RST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= RST_VAL;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
