// Reference model for the single-precision adder testbenches. It adds the
// operands exactly as wide signed integers (every finite binary32 value is
// an integer multiple of 2^-149), then rounds to nearest even, with the same
// conventions as the adder: subnormal inputs read as zero, results below the
// normal range flushed to signed zero, quiet NaN 0x7FC00000.
package fp_ref_pkg;
  localparam int XW = 300;

  typedef struct packed {
    logic [4:0]  flags;   // {nan, overflow, underflow, inexact, zero}
    logic [31:0] z;
  } ref_result_t;

  function automatic ref_result_t ref_add(logic [31:0] x, logic [31:0] y, logic sub);
    ref_result_t r;
    logic sx, sy, sz;
    logic [7:0] ex, ey;
    logic [22:0] fx, fy;
    logic signed [XW-1:0] vx, vy, vs;
    logic [XW-1:0] mag, rem, half, kept;
    int k, e;
    logic up;
    sx = x[31]; ex = x[30:23]; fx = x[22:0];
    sy = y[31] ^ sub; ey = y[30:23]; fy = y[22:0];
    r = '0;
    // NaN and infinity
    if ((ex == 8'hFF && fx != 0) || (ey == 8'hFF && fy != 0) ||
        (ex == 8'hFF && ey == 8'hFF && sx != sy)) begin
      r.z = 32'h7FC0_0000; r.flags = 5'b10000; return r;
    end
    if (ex == 8'hFF) begin r.z = {sx, ex, fx}; return r; end
    if (ey == 8'hFF) begin r.z = {sy, ey, fy}; return r; end
    if (ex == 0 && ey == 0) begin r.z = {sx & sy, 31'b0}; r.flags = 5'b00001; return r; end
    if (ex == 0) begin r.z = {sy, ey, fy}; return r; end
    if (ey == 0) begin r.z = {sx, ex, fx}; return r; end
    // exact sum: bit 0 weighs 2^(1-127-23)
    vx = $signed(XW'({1'b1, fx})) <<< (ex - 1);
    vy = $signed(XW'({1'b1, fy})) <<< (ey - 1);
    if (sx) vx = -vx;
    if (sy) vy = -vy;
    vs = vx + vy;
    if (vs == 0) begin r.z = 32'h0; r.flags = 5'b00001; return r; end
    sz  = vs < 0;
    mag = sz ? XW'(-vs) : XW'(vs);
    k = 0;
    for (int i = 0; i < XW; i++) if (mag[i]) k = i;
    e = k - 22;
    if (e < 1) begin r.z = {sz, 31'b0}; r.flags = 5'b00111; return r; end
    kept = mag >> (k - 23);
    rem  = mag & ((XW'(1) << (k - 23)) - 1);
    half = (k >= 24) ? (XW'(1) << (k - 24)) : '0;
    up   = (k >= 24) && ((rem > half) || (rem == half && kept[0]));
    kept = kept + XW'(up);
    if (kept[24]) begin kept = kept >> 1; e = e + 1; end
    if (e >= 255) begin r.z = {sz, 8'hFF, 23'b0}; r.flags = 5'b01010; return r; end
    r.z = {sz, 8'(e), kept[22:0]};
    r.flags = {3'b000, rem != 0, 1'b0};
    return r;
  endfunction
endpackage
