// cordic_atan_pkg: arctangent table shared by both CORDIC converters.
//
// Entry k is atan(2^-k) expressed in a 20-bit full-turn angle unit,
// round(atan(2^-k) / (2*pi) * 2^20), for k = 0..19. CORDIC_INV_GAIN is the
// reciprocal of the CORDIC gain prod(sqrt(1 + 2^-2k)) = 1.64676, in Q0.16.
package cordic_atan_pkg;

  localparam int unsigned ANGLE_W = 20;

  localparam logic [ANGLE_W-1:0] HALF_TURN = 20'h80000;
  localparam logic [15:0] CORDIC_INV_GAIN = 16'd39797;

  function automatic logic [ANGLE_W-1:0] atan_k(input int unsigned k);
    case (k)
      0:  return 20'd131072;
      1:  return 20'd77376;
      2:  return 20'd40884;
      3:  return 20'd20753;
      4:  return 20'd10417;
      5:  return 20'd5213;
      6:  return 20'd2607;
      7:  return 20'd1304;
      8:  return 20'd652;
      9:  return 20'd326;
      10: return 20'd163;
      11: return 20'd81;
      12: return 20'd41;
      13: return 20'd20;
      14: return 20'd10;
      15: return 20'd5;
      16: return 20'd3;
      17: return 20'd1;
      18: return 20'd1;
      default: return 20'd0;
    endcase
  endfunction

endpackage
