// NOP counter of the external memory interface.
//
// A down-counter the FSM loads with the number of clocks a multi-cycle operation must
// last (power-up wait, precharge-all, mode-register load, auto refresh). While it runs,
// the FSM issues NOP commands; done is high once the loaded number of clocks has passed.
// Loading N (N >= 1) in cycle t makes done rise in cycle t+N; the FSM loads only in a cycle in which done is high. The document names the
// counter and its purpose; the width and load behaviour are this design's choice.
module nop_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] value,
  output logic             done
);
  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (load)       cnt <= value - 1'b1;
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign done = (cnt == '0);
endmodule
