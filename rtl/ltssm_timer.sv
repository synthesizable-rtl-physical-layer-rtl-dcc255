// ltssm_timer: timeout counter of the LTSSM.
// While i_Start is high the counter advances once per clock; when i_Start is
// low it is cleared, so the next count starts from zero. o_Timeout is high
// once the count has reached i_Timeout_value (the state machine loads the
// timeout of the current sub-state). The counter saturates at the maximum so
// it never wraps. Widths follow the document's 23-bit timeout value.
module ltssm_timer #(
  parameter int unsigned WIDTH = 23
) (
  input  logic             i_clk,
  input  logic             i_reset_n,
  input  logic [WIDTH-1:0] i_Timeout_value,
  input  logic             i_Start,
  output logic             o_Timeout
);
  logic [WIDTH-1:0] count;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n)              count <= '0;
    else if (!i_Start)           count <= '0;
    else if (count != '1)        count <= count + 1'b1;
  end

  assign o_Timeout = i_Start && (count >= i_Timeout_value);
endmodule
