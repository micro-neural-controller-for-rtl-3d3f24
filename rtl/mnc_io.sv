// mnc_io - I/O system of the microcontroller.
//
// Connects the microcontroller's data bus to the board. Input lines that are
// active low (ACTIVE_LOW bits set) pass through an inverter before they are
// latched, so every signal the program sees is active high, as the document
// describes. The latch is a register loaded on every clock edge.
//
// Registers, at data addresses 0x80-0x89 (see mnc_pkg for names):
//   0x80 R  auxiliary buttons          0x85 RW network input pixels 7:0
//   0x81 R  matrix 0 pixels 7:0        0x86 RW network input pixels 14:8,
//   0x82 R  matrix 0 pixels 14:8               a write starts the network
//   0x83 R  matrix 1 pixels 7:0        0x87 R  [7] busy [4] valid [3:0] class
//   0x84 R  matrix 1 pixels 14:8       0x88 RW output port 0
//                                      0x89 RW output port 1
// Reads are synchronous like the memories: rdata is valid one clock after re.
// ann_start is a one-clock pulse in the cycle after the write to 0x86; the
// network samples the pixel register in that same cycle. The register map and
// handshake are this design's own; the document only says that the
// microcontroller moves data between the user and the network.
module mnc_io
  import mnc_pkg::*;
#(
  parameter bit ACTIVE_LOW = 1'b1   // board inputs are active low
) (
  input  logic               clk,
  input  logic               rst_n,
  // board side
  input  logic [N_BTN-1:0]   btn_raw,
  input  pixels_t            m0_raw,
  input  pixels_t            m1_raw,
  output data_t              out0,
  output data_t              out1,
  // data bus side
  input  logic               re,
  input  logic               we,
  input  logic [3:0]         addr,
  input  data_t              wdata,
  output data_t              rdata,
  // network side
  output pixels_t            ann_pixels,
  output logic               ann_start,
  input  logic               ann_busy,
  input  logic               ann_valid,
  input  logic [CLS_W-1:0]   ann_class
);

  localparam int unsigned IN_W = N_BTN + 2 * N_IN;

  logic [IN_W-1:0] raw, active, latched;
  logic [N_BTN-1:0] btn;
  pixels_t          m0, m1;

  assign raw    = {m1_raw, m0_raw, btn_raw};
  assign active = ACTIVE_LOW ? ~raw : raw;   // NOT gates in front of the latch

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) latched <= '0;
    else        latched <= active;
  end

  assign {m1, m0, btn} = latched;

  // Write side.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ann_pixels <= '0;
      ann_start  <= 1'b0;
      out0       <= '0;
      out1       <= '0;
    end else begin
      ann_start <= 1'b0;
      if (we) begin
        unique case (addr)
          IO_ANN_LO[3:0]: ann_pixels[7:0] <= wdata;
          IO_ANN_HI[3:0]: begin
            ann_pixels[N_IN-1:8] <= wdata[N_IN-9:0];
            ann_start            <= 1'b1;
          end
          IO_OUT0[3:0]:   out0 <= wdata;
          IO_OUT1[3:0]:   out1 <= wdata;
          default: ;
        endcase
      end
    end
  end

  // Read side.
  data_t rmux;
  always_comb begin
    unique case (addr)
      IO_BTN[3:0]:      rmux = data_t'(btn);
      IO_M0_LO[3:0]:    rmux = m0[7:0];
      IO_M0_HI[3:0]:    rmux = data_t'(m0[N_IN-1:8]);
      IO_M1_LO[3:0]:    rmux = m1[7:0];
      IO_M1_HI[3:0]:    rmux = data_t'(m1[N_IN-1:8]);
      IO_ANN_LO[3:0]:   rmux = ann_pixels[7:0];
      IO_ANN_HI[3:0]:   rmux = data_t'(ann_pixels[N_IN-1:8]);
      IO_ANN_STAT[3:0]: rmux = {ann_busy, 2'b00, ann_valid, ann_class};
      IO_OUT0[3:0]:     rmux = out0;
      IO_OUT1[3:0]:     rmux = out1;
      default:          rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= rmux;
  end

endmodule
