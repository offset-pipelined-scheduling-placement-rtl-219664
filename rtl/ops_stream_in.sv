// ops_stream_in: input stream port of a domain.
//
// A one-word buffer between an external producer (valid/ready handshake) and
// the statically scheduled array. The buffered word is offered to the word
// crossbar, valid while the buffer is full; an instruction with sin_pop set
// consumes it and the buffer accepts the next word in the same cycle
// (in_ready is high when the buffer is empty or being popped). Popping an
// empty buffer yields an invalid word and raises `underflow` for one cycle.
// The existence of one input stream port per domain follows the architecture
// description; the buffer and handshake are this design's choice.
module ops_stream_in
  import ops_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  input  logic         pop,
  output word_t        word,
  output logic         underflow
);
  word_t buf_q;

  assign in_ready  = !buf_q.valid || pop;
  assign word      = buf_q;
  assign underflow = pop && !buf_q.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  buf_q <= '0;
    else if (in_valid && in_ready) buf_q <= '{valid: 1'b1, data: in_data};
    else if (pop)                buf_q.valid <= 1'b0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid && !in_ready |=> $stable(in_data) || !in_valid)
    else $error("stream producer changed in_data while stalled");
endmodule
