// score_model: behavioural stand-in for the score processor, for simulation
// only. On every `score_event` pulse it adds the current snake length to the
// score and presents the total as four BCD digits (saturating at 9999).
module score_model (
  input  logic        clk,
  input  logic        rst,
  input  logic        score_event,
  input  logic [5:0]  snake_len,
  output logic [15:0] score_bcd,
  output int          score
);
  always_ff @(posedge clk) begin
    if (rst) score <= 0;
    else if (score_event) score <= (score + int'(snake_len) > 9999) ? 9999 : score + int'(snake_len);
  end
  assign score_bcd = {4'(score / 1000), 4'((score / 100) % 10), 4'((score / 10) % 10), 4'(score % 10)};
endmodule
