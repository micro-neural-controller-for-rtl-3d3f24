// mnc_top - micro neural-controller for optical character recognition.
//
// The whole system of the document's block diagram: the bitmap of a
// character enters the custom microcontroller (mnc_uc, with its code
// memory), which hands it to the neural network (mnc_ann); the network's
// answer goes to the text output (mnc_text_output) and back to the
// microcontroller, whose program (a 1-digit calculator by default) uses it.
//
// Board interface (the document's test set-up): two 3x5 push-button
// matrices m0_n/m1_n and auxiliary buttons btn_n (bit 0 add, 1 subtract,
// 2 multiply), all active low; output ports out0 (calculator result, 8-bit
// two's complement) and out1 (operation); the last recognised character as
// ASCII on char_o with a one-clock char_valid strobe. One clock, active-low
// asynchronous reset. Timing: four clocks per instruction, 322 clocks per
// classification.
module mnc_top
  import mnc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_BTN-1:0] btn_n,
  input  pixels_t          m0_n,
  input  pixels_t          m1_n,
  output data_t            out0,
  output data_t            out1,
  output logic [7:0]       char_o,
  output logic             char_valid,
  output logic [7:0]       char_count,
  output logic             halted
);

  pixels_t          ann_pixels;
  logic             ann_start, ann_busy, ann_done, ann_valid;
  logic [CLS_W-1:0] ann_class;
  act_t             ann_scores [N_OUT];
  pc_t              pc;
  cu_state_t        cu_state;
  data_t            reg_a, reg_b;

  mnc_uc u_uc (
    .clk, .rst_n,
    .btn_raw(btn_n), .m0_raw(m0_n), .m1_raw(m1_n), .out0, .out1,
    .ann_pixels, .ann_start, .ann_busy, .ann_valid, .ann_class,
    .pc, .cu_state, .reg_a, .reg_b, .halted
  );

  mnc_ann u_ann (
    .clk, .rst_n, .start(ann_start), .pixels(ann_pixels),
    .busy(ann_busy), .done(ann_done), .valid(ann_valid), .class_o(ann_class),
    .scores(ann_scores)
  );

  mnc_text_output u_text (
    .clk, .rst_n, .ann_done, .ann_class, .char_o, .char_valid, .char_count
  );

endmodule
