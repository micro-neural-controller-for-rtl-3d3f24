// mnc_ann - feedforward neural network classifying one 3x5 pixel character.
//
// Topology from the document: 15 binary inputs (one per pixel), 12 hidden
// neurons, 10 output neurons (one per decimal digit), weights W1/W2 and
// biases b1/b2, and a positive ramp activation in both layers:
//   h[j] = ramp(b1[j] + sum_i W1[j][i] * x[i])
//   y[o] = ramp(b2[o] + sum_j W2[o][j] * h[j])
// ramp() clips negative sums to 0 and saturates at 255. The class reported
// is the output neuron with the largest value (the lowest index on a tie).
//
// Datapath: one multiply-accumulate unit shared by all neurons. The
// sequencer visits the neurons one at a time, spends one clock per weight
// and one more to add the bias and apply the ramp, so a classification
// takes ANN_LATENCY = 12*(15+1) + 10*(12+1) = 322 clocks. A layer-1 product
// is a weight or zero (inputs are 0/1); layer 2 multiplies an 8-bit
// activation by an 8-bit signed weight. The arg-max is tracked as the output
// neurons finish.
//
// Interface: pulse start with the pixels on `pixels` (sampled at that edge,
// ignored while busy). busy stays high until done pulses for one clock;
// class_o, scores and valid then hold until the next start. valid falls when
// a new start is accepted.
//
// Weights and biases are parameters. The document trained its weights
// offline and does not list them; the defaults (mnc_pkg::default_w1 etc.)
// form a template-matching network built from the ten training digits.
// The serial MAC datapath, the 8-bit fixed-point formats and the arg-max
// output are this design's choices.
module mnc_ann
  import mnc_pkg::*;
#(
  parameter w1_t W1 = default_w1(),
  parameter b1_t B1 = default_b1(),
  parameter w2_t W2 = default_w2(),
  parameter b2_t B2 = default_b2()
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pixels_t          pixels,
  output logic             busy,
  output logic             done,
  output logic             valid,
  output logic [CLS_W-1:0] class_o,
  output act_t             scores [N_OUT]
);

  typedef enum logic [2:0] {S_IDLE, S_L1, S_L1_ACT, S_L2, S_L2_ACT} state_t;

  typedef logic signed [ACC_W-1:0] acc_t;

  state_t  state;
  pixels_t x;
  act_t    hid [N_HID];
  acc_t    acc;
  localparam int unsigned NEU_W = $clog2(N_HID);
  localparam int unsigned IDX_W = $clog2(N_IN);
  logic [NEU_W-1:0] neuron;   // hidden neuron (layer 1) or output neuron (layer 2)
  logic [IDX_W-1:0] idx;      // input of the current neuron
  act_t             best;
  logic [CLS_W-1:0] best_cls;

  // Multiply-accumulate operand selection.
  acc_t  product, acc_b, sum_b;
  act_t  act;
  always_comb begin
    product = '0;
    acc_b   = '0;
    if (state == S_L1) begin
      product = x[idx] ? acc_t'(weight_t'(W1[neuron][idx])) : '0;
    end else if (state == S_L2) begin
      product = acc_t'($signed({1'b0, hid[idx]}) * weight_t'(W2[neuron][idx]));
    end
    if (state == S_L1_ACT) acc_b = acc_t'(weight_t'(B1[neuron]));
    else if (state == S_L2_ACT) acc_b = acc_t'(weight_t'(B2[neuron]));
    sum_b = acc + acc_b;
    act   = ramp(sum_b);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      x        <= '0;
      acc      <= '0;
      neuron   <= '0;
      idx      <= '0;
      best     <= '0;
      best_cls <= '0;
      done     <= 1'b0;
      valid    <= 1'b0;
      class_o  <= '0;
      for (int j = 0; j < N_HID; j++) hid[j] <= '0;
      for (int o = 0; o < N_OUT; o++) scores[o] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            x      <= pixels;
            acc    <= '0;
            neuron <= '0;
            idx    <= '0;
            valid  <= 1'b0;
            state  <= S_L1;
          end
        end
        S_L1: begin
          acc <= acc + product;
          if (idx == IDX_W'(N_IN - 1)) state <= S_L1_ACT;
          else                 idx   <= idx + 1'b1;
        end
        S_L1_ACT: begin
          hid[neuron] <= act;
          acc <= '0;
          idx <= '0;
          if (neuron == NEU_W'(N_HID - 1)) begin
            neuron <= '0;
            state  <= S_L2;
          end else begin
            neuron <= neuron + 1'b1;
            state  <= S_L1;
          end
        end
        S_L2: begin
          acc <= acc + product;
          if (idx == IDX_W'(N_HID - 1)) state <= S_L2_ACT;
          else                  idx   <= idx + 1'b1;
        end
        S_L2_ACT: begin
          scores[neuron] <= act;
          acc <= '0;
          idx <= '0;
          if (neuron == 0 || act > best) begin
            best     <= act;
            best_cls <= neuron[CLS_W-1:0];
          end
          if (neuron == NEU_W'(N_OUT - 1)) begin
            class_o <= (act > best) ? CLS_W'(N_OUT - 1) : best_cls;
            done    <= 1'b1;
            valid   <= 1'b1;
            state   <= S_IDLE;
          end else begin
            neuron <= neuron + 1'b1;
            state  <= S_L2;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: an accepted start makes the unit busy on the next
  // clock; done comes with valid and with busy already released.
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |=> busy && !valid);
  assert property (@(posedge clk) disable iff (!rst_n) done |-> valid && !busy);

endmodule
