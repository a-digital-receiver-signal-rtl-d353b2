// cos_lut: quarter-wave cosine table with separate cosine and sine outputs.
//
// The phase index p (0 .. 191) addresses one period of cos(2*pi*p/192). Only
// the first quarter, Q[r] = round(255 * cos(2*pi*r/192)) for r = 0 .. 47, is
// stored. The other quarters are rebuilt by negating the value or by reading
// the quarter backwards (index 48 - r), as the source design describes:
//   quadrant 0: +Q[r]     quadrant 1: -Q[48-r]
//   quadrant 2: -Q[r]     quadrant 3: +Q[48-r]
// where Q[48] = cos(pi/2) = 0 is not stored but produced as zero. The sine is
// the cosine shifted by a quarter period, sin(x) = cos(x - pi/2), i.e. the
// cosine at p - 48. Because cosine and sine read the table in opposite orders at the
// same time, each has its own multiplexer tree (two case statements on the
// same table).
//
// Interface: combinational. phase in, cos_o/sin_o out as magnitude plus a
// negate flag; the flag is consumed downstream by an XOR with the input sign
// so that no separate negation stage is needed.
// The table size and the quarter-wave scheme follow the source design; the
// 8-bit magnitude and the rounding of the entries are this design's choice.
module cos_lut
  import rssi_pkg::*;
(
  input  logic [PhaseW-1:0] phase,
  output lut_val_t          cos_o,
  output lut_val_t          sin_o
);

  // One quarter period of the cosine, 1.0 = 255.
  function automatic logic [LutW-1:0] quarter(input logic [PhaseW-1:0] r);
    logic [LutW-1:0] v;
    case (r)
      0: v = 8'd255;  1: v = 8'd255;  2: v = 8'd254;  3: v = 8'd254;
      4: v = 8'd253;  5: v = 8'd252;  6: v = 8'd250;  7: v = 8'd248;
      8: v = 8'd246;  9: v = 8'd244; 10: v = 8'd241; 11: v = 8'd239;
     12: v = 8'd236; 13: v = 8'd232; 14: v = 8'd229; 15: v = 8'd225;
     16: v = 8'd221; 17: v = 8'd217; 18: v = 8'd212; 19: v = 8'd207;
     20: v = 8'd202; 21: v = 8'd197; 22: v = 8'd192; 23: v = 8'd186;
     24: v = 8'd180; 25: v = 8'd174; 26: v = 8'd168; 27: v = 8'd162;
     28: v = 8'd155; 29: v = 8'd149; 30: v = 8'd142; 31: v = 8'd135;
     32: v = 8'd128; 33: v = 8'd120; 34: v = 8'd113; 35: v = 8'd105;
     36: v = 8'd98;  37: v = 8'd90;  38: v = 8'd82;  39: v = 8'd74;
     40: v = 8'd66;  41: v = 8'd58;  42: v = 8'd50;  43: v = 8'd42;
     44: v = 8'd33;  45: v = 8'd25;  46: v = 8'd17;  47: v = 8'd8;
      default: v = '0;  // index 48: cos(pi/2)
    endcase
    return v;
  endfunction

  // Reconstruct cos(2*pi*p/192) from the quarter table.
  function automatic lut_val_t full_cos(input logic [PhaseW-1:0] p);
    logic [1:0]        quad;
    logic [PhaseW-1:0] r;
    lut_val_t          v;
    if (p < PhaseW'(LutQuarter)) begin
      quad = 2'd0; r = p;
    end else if (p < PhaseW'(2*LutQuarter)) begin
      quad = 2'd1; r = p - PhaseW'(LutQuarter);
    end else if (p < PhaseW'(3*LutQuarter)) begin
      quad = 2'd2; r = p - PhaseW'(2*LutQuarter);
    end else begin
      quad = 2'd3; r = p - PhaseW'(3*LutQuarter);
    end
    // Quadrants 1 and 3 read the quarter backwards.
    v.mag = quad[0] ? quarter(PhaseW'(LutQuarter) - r) : quarter(r);
    // Quadrants 1 and 2 are negative.
    v.neg = quad[0] ^ quad[1];
    return v;
  endfunction

  logic [PhaseW-1:0] sin_phase;

  // sin(x) = cos(x - pi/2): index p - 48 modulo 192.
  always_comb begin
    if (phase >= PhaseW'(LutQuarter)) sin_phase = phase - PhaseW'(LutQuarter);
    else                              sin_phase = phase + PhaseW'(LutPeriod - LutQuarter);
  end

  always_comb cos_o = full_cos(phase);
  always_comb sin_o = full_cos(sin_phase);

endmodule
