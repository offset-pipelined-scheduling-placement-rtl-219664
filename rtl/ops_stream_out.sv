// ops_stream_out: output stream port of a domain.
//
// Every valid word the crossbar routes to the port while the domain is
// executing is emitted for one cycle on out_valid/out_data, one cycle after
// it reaches the port. The statically scheduled array cannot be stalled, so
// a word emitted while out_ready is low is lost and sets the sticky
// `overflow` flag (cleared by reset). The existence of one output stream port
// per domain follows the architecture description; the timing and overflow
// rule are this design's choice.
module ops_stream_out
  import ops_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  word_t        word,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  output logic         overflow
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= en & word.valid;
      if (en && word.valid) out_data <= word.data;
      if (out_valid && !out_ready) overflow <= 1'b1;
    end
  end
endmodule
