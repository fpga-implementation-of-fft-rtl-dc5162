// delay_line: a chain of DEPTH registers that delays a WIDTH-bit word by
// DEPTH clock cycles (DEPTH = 0 is a plain wire). Used to keep operands,
// flags and tags in step with the floating point pipelines. Registers are
// cleared by the active-low reset. A helper of this implementation, not
// a block of the source design.
module delay_line #(
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
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end
endmodule
