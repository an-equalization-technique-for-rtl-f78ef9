// Twiddle-factor ROM of the 64-point FFT.
//
// Returns W64^k = cos(2*pi*k/64) - j*sin(2*pi*k/64) for k = 0..63 as two
// 8-bit Q2.6 words (2 integer bits including the sign, 6 fraction bits), the
// twiddle width the FFT uses. Only a quarter wave is stored: entry i of the
// table is round(64*cos(2*pi*i/64)), i = 0..16; the quadrant of k selects the
// entries and signs. The read is combinational.
module twiddle_rom
  import teq_pkg::*;
(
  input  logic [5:0] k,
  output ctw_t       w
);
  function automatic tw_t qcos(input logic [4:0] i);
    case (i)
      5'd0:  return 8'sd64;
      5'd1:  return 8'sd64;
      5'd2:  return 8'sd63;
      5'd3:  return 8'sd61;
      5'd4:  return 8'sd59;
      5'd5:  return 8'sd56;
      5'd6:  return 8'sd53;
      5'd7:  return 8'sd49;
      5'd8:  return 8'sd45;
      5'd9:  return 8'sd41;
      5'd10: return 8'sd36;
      5'd11: return 8'sd30;
      5'd12: return 8'sd24;
      5'd13: return 8'sd19;
      5'd14: return 8'sd12;
      5'd15: return 8'sd6;
      default: return 8'sd0;
    endcase
  endfunction

  logic [3:0] r;
  tw_t        c, s;   // cos and sin of the angle inside the quadrant

  assign r = k[3:0];
  assign c = qcos({1'b0, r});
  assign s = qcos(5'd16 - {1'b0, r});

  // angle = quadrant*pi/2 + theta; W = cos(angle) - j sin(angle)
  always_comb begin
    case (k[5:4])
      2'd0: begin w.re = c;  w.im = -s; end
      2'd1: begin w.re = -s; w.im = -c; end
      2'd2: begin w.re = -c; w.im = s;  end
      default: begin w.re = s;  w.im = c;  end
    endcase
  end
endmodule
