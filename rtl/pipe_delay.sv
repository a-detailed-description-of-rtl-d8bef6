// pipe_delay: N-stage register delay for a W-bit bus (N = 0 is a wire).
// Used to line up data that reach a DSM over a shorter path, so that every
// input of that DSM belongs to the same beam crossing. Reset clears all stages.
module pipe_delay #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(N); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(N); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[N-1];
  end

endmodule
