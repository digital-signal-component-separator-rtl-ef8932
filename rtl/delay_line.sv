// delay_line: a register chain that delays a WIDTH-bit word by DEPTH clock
// cycles (DEPTH = 0 passes the word through). It keeps side signals aligned
// with the pipelined CORDICs. Reset clears every stage.
module delay_line #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
      end else begin
        stage[0] <= din;
        for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
      end
    end
    assign dout = stage[DEPTH-1];
  end
endmodule
