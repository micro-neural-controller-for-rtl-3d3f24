// mnc_text_output - turns recognised characters into text.
//
// Receives the network's class index with its done strobe and emits the
// character as an ASCII code ('0' + class for the ten digits) on char_o,
// with char_valid pulsing for one clock one edge after done. It also keeps
// a count of characters emitted (wrapping) so a host can see that a new one
// arrived. The document shows this block only as the sink of the network's
// output; the ASCII coding and the counter are this design's choice.
module mnc_text_output
  import mnc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ann_done,
  input  logic [CLS_W-1:0] ann_class,
  output logic [7:0]       char_o,
  output logic             char_valid,
  output logic [7:0]       char_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      char_o     <= 8'h20;   // space until the first character
      char_valid <= 1'b0;
      char_count <= '0;
    end else begin
      char_valid <= ann_done;
      if (ann_done) begin
        char_o     <= (ann_class < CLS_W'(N_OUT)) ? 8'h30 + 8'(ann_class) : 8'h3F;  // '?' if out of range
        char_count <= char_count + 1'b1;
      end
    end
  end

endmodule
