// tb_ref_pkg: floating-point reference models used by the testbenches.
//
// They follow the formulas of the colour standards directly (luma weights,
// colour differences, transfer curves, primaries and D65 white), written
// independently of the fixed-point arithmetic of the design, and a small
// pixel-stream checker state shared by all testbenches.
package tb_ref_pkg;
  localparam real ONE = 16777216.0;   // 1.0 at 24 bits

  function automatic real clip01(input real v);
    if (v < 0.0) return 0.0;
    if (v > 1.0) return 1.0;
    return v;
  endfunction

  function automatic longint to24(input real v);   // [0,1] -> saturated code
    real r;
    r = v * ONE + 0.5;
    if (r < 0.0) return 0;
    if (r > ONE - 1.0) return 64'(16777215);
    return longint'($floor(r));
  endfunction

  // Forward / inverse transfer functions (0: BT, 1: sRGB, 2: opRGB).
  function automatic real oetf(input int g, input real v);
    case (g)
      0: return (v < 0.018) ? 4.5 * v : 1.099 * $pow(v, 0.45) - 0.099;
      1: return (v <= 0.0031308) ? 12.92 * v : 1.055 * $pow(v, 1.0 / 2.4) - 0.055;
      default: return $pow(v, 256.0 / 563.0);
    endcase
  endfunction
  function automatic real eotf(input int g, input real v);
    case (g)
      0: return (v < 0.081) ? v / 4.5 : $pow((v + 0.099) / 1.099, 1.0 / 0.45);
      1: return (v <= 0.04045) ? v / 12.92 : $pow((v + 0.055) / 1.055, 2.4);
      default: return $pow(v, 563.0 / 256.0);
    endcase
  endfunction

  // Luma weights: 0 BT.601, 1 BT.709, 2 BT.2020.
  function automatic real kr(input int m);
    return (m == 1) ? 0.2126 : (m == 2) ? 0.2627 : 0.299;
  endfunction
  function automatic real kb(input int m);
    return (m == 1) ? 0.0722 : (m == 2) ? 0.0593 : 0.114;
  endfunction

  function automatic longint iabs(input longint v);
    return (v < 0) ? -v : v;
  endfunction
endpackage
