// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the encoder as its state table, the PN generator
// bit by bit, the QPSK constellation as a table, and the DFT in floating
// point.
package tb_ref_pkg;

  // Encoder state table: index {state(2), u}; next state and output {v1,v2}.
  localparam logic [1:0] ENC_NEXT [8] = '{2'b00, 2'b10, 2'b00, 2'b10, 2'b01, 2'b11, 2'b01, 2'b11};
  localparam logic [1:0] ENC_OUT  [8] = '{2'b00, 2'b11, 2'b11, 2'b00, 2'b10, 2'b01, 2'b01, 2'b10};

  // QPSK points, index = bit pair: 00 -> 0 rad, 01 -> pi/2, 10 -> 3pi/2, 11 -> pi.
  localparam int QPSK_RE [4] = '{1, 0, 0, -1};
  localparam int QPSK_IM [4] = '{0, 1, -1, 0};

  // 7-stage PN generator, x^7 + x^6 + 1, stage 1 = bit 0, output = stage 7.
  class pn_model;
    bit [6:0] r;
    function new(bit [6:0] seed = 7'b1010101);
      r = seed;
    endfunction
    function bit next();
      bit o, fb;
      o  = r[6];
      fb = r[6] ^ r[5];
      r  = {r[5:0], fb};
      return o;
    endfunction
  endclass

  // 8-point DFT (inverse = 0) or inverse DFT with 1/8 (inverse = 1).
  function automatic void dft8(input real xr[8], input real xi[8], input bit inverse,
                               output real yr[8], output real yi[8]);
    real sgn, ang, scale;
    sgn   = inverse ? 1.0 : -1.0;
    scale = inverse ? 0.125 : 1.0;
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        ang = sgn * 2.0 * 3.14159265358979 * real'(n * k) / 8.0;
        yr[k] += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        yi[k] += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      yr[k] *= scale;
      yi[k] *= scale;
    end
  endfunction

endpackage
