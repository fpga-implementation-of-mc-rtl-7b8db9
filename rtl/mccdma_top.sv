// mccdma_top: MC-CDMA baseband transmitter and receiver, side by side.
//
// Transmit chain, one data bit in per clock while in_ready is high:
//   conv_encoder (rate 1/2) -> spreader (PN XOR) -> qpsk_framer (8 QPSK
//   points per OFDM symbol) -> ifft8 -> piso_cp (cyclic prefix + serial).
// Receive chain, one complex sample per clock:
//   sipo_cp (prefix removed, parallel) -> fft8 -> qpsk_deframer (decision,
//   serial) -> despreader (PN XOR) -> viterbi_decoder.
//
// The low-pass filters and the channel that sit between the two chains are
// not built; the transmit samples are brought out on tx_* and the receiver
// takes its samples on rx_*. Connecting tx_* to rx_* gives the back-to-back
// link the design is verified with.
//
// Flow: each OFDM symbol carries 8 data bits (16 coded bits, 8 QPSK points)
// and occupies N_SC + CP_LEN = 10 sample clocks on the line, so the
// transmitter takes 8 bits per 10 clocks on average; in_ready falls while the
// PISO is still sending (the framer then holds a full frame). Decoded bits
// appear on out_bit/out_valid about 10 + DEPTH trellis steps after they went
// in. A message is flushed by following it with DEPTH - 1 or more zero bits,
// padded to a multiple of 8 bits so the last symbol is sent.
module mccdma_top
  import mccdma_pkg::*;
#(
  parameter int CP_LEN = 2,       // cyclic prefix, samples
  parameter int DEPTH  = 15,      // Viterbi survivor depth
  parameter int PN_M   = 7        // PN generator length
) (
  input  logic  clk,
  input  logic  rst_n,
  // transmitter data input
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  in_bit,
  // transmitter sample output (towards the low-pass filter / channel)
  output logic  tx_valid,
  output logic  tx_first,
  output cplx_t tx_sample,
  // receiver sample input (from the channel / low-pass filter)
  input  logic  rx_valid,
  input  logic  rx_first,
  input  cplx_t rx_sample,
  // receiver data output
  output logic  out_valid,
  output logic  out_bit,
  // status
  output logic  rx_cp_drop,      // receiver discarded a cyclic-prefix sample
  output logic  rx_overrun       // deframer got a frame before the last was sent
);

  // ---------------- transmitter ----------------
  logic       enc_valid, enc_ready;
  logic [1:0] enc_code;
  logic       spr_valid, spr_ready;
  logic [1:0] spr_code;
  logic       frm_valid, frm_ready;
  frame_t     frm_frame;
  logic       ifft_valid, ifft_ready;
  frame_t     ifft_frame;

  conv_encoder u_enc (
    .clk, .rst_n, .clear(1'b0),
    .in_valid, .in_ready, .in_bit,
    .out_valid(enc_valid), .out_ready(enc_ready), .out_code(enc_code)
  );

  spreader #(.M(PN_M)) u_spr (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(enc_valid), .in_ready(enc_ready), .in_code(enc_code),
    .out_valid(spr_valid), .out_ready(spr_ready), .out_code(spr_code)
  );

  qpsk_framer u_frm (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(spr_valid), .in_ready(spr_ready), .in_code(spr_code),
    .out_valid(frm_valid), .out_ready(frm_ready), .out_frame(frm_frame)
  );

  ifft8 u_ifft (
    .clk, .rst_n,
    .in_valid(frm_valid), .in_ready(frm_ready), .in_frame(frm_frame),
    .out_valid(ifft_valid), .out_ready(ifft_ready), .out_frame(ifft_frame)
  );

  piso_cp #(.CP_LEN(CP_LEN)) u_piso (
    .clk, .rst_n,
    .in_valid(ifft_valid), .in_ready(ifft_ready), .in_frame(ifft_frame),
    .out_valid(tx_valid), .out_sample(tx_sample), .out_first(tx_first)
  );

  // ---------------- receiver ----------------
  logic       sipo_valid;
  frame_t     sipo_frame;
  logic       fft_valid;
  frame_t     fft_frame;
  logic       dfr_valid;
  logic [1:0] dfr_code;
  logic       dsp_valid;
  logic [1:0] dsp_code;

  sipo_cp #(.CP_LEN(CP_LEN)) u_sipo (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_first(rx_first), .in_sample(rx_sample),
    .out_valid(sipo_valid), .out_frame(sipo_frame), .cp_drop(rx_cp_drop)
  );

  fft8 u_fft (
    .clk, .rst_n,
    .in_valid(sipo_valid), .in_ready(), .in_frame(sipo_frame),
    .out_valid(fft_valid), .out_ready(1'b1), .out_frame(fft_frame)
  );

  qpsk_deframer u_dfr (
    .clk, .rst_n,
    .in_valid(fft_valid), .in_frame(fft_frame),
    .out_valid(dfr_valid), .out_code(dfr_code), .overrun(rx_overrun)
  );

  despreader #(.M(PN_M)) u_dsp (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(dfr_valid), .in_code(dfr_code),
    .out_valid(dsp_valid), .out_code(dsp_code)
  );

  viterbi_decoder #(.DEPTH(DEPTH)) u_vit (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(dsp_valid), .in_code(dsp_code),
    .out_valid, .out_bit
  );

endmodule
