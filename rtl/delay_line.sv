// delay_line: N-clock shift register for a W-bit bundle, used to keep
// video data and sync signals aligned with the pipelined processing units.
// N = 0 is a plain wire. Reset clears every stage.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] st [N + 1];
  assign st[0] = d;
  for (genvar i = 0; i < N; i++) begin : g_st
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[i+1] <= '0;
      else        st[i+1] <= st[i];
    end
  end
  assign q = st[N];
endmodule
