// tan_delay: D-stage register chain of width W (D = 0 is a plain wire).
//
// Used to carry side data alongside the reciprocal pipeline and to pad the
// tangent pipeline to its configured total latency. With RESET = 1 every stage
// is cleared by the asynchronous active-low reset (used where a valid bit
// travels in the word); with RESET = 0 the stages have no reset and rst_n is
// left unconnected inside.
module tan_delay #(
  parameter int unsigned W = 33,
  parameter int unsigned D = 1,
  parameter bit          RESET = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else if (RESET) begin : g_regs_rst
    logic [W-1:0] pipe [D];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < D; i++) pipe[i] <= '0;
      end else begin
        pipe[0] <= din;
        for (int i = 1; i < D; i++) pipe[i] <= pipe[i-1];
      end
    assign dout = pipe[D-1];
  end else begin : g_regs
    logic [W-1:0] pipe [D];
    always_ff @(posedge clk) begin
      pipe[0] <= din;
      for (int i = 1; i < D; i++) pipe[i] <= pipe[i-1];
    end
    assign dout = pipe[D-1];
  end
endmodule
