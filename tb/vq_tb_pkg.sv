// vq_tb_pkg: stimulus and reference model shared by the testbenches.
//
// The reference works on the picture geometry, not on the microblock word:
// a test picture is a function of (x, y), an 8x8 block is cut out of it as a
// plain 2-D array, and the expected metrics are computed from that array.
//   Blockiness: in an 8x8 transferred block the codec borders run between
//   columns 6|7 and rows 6|7 (the grid is shifted by one pixel). Rows
//   0,1,2,3,4,7 contribute horizontal pairs and columns 0,1,2,3,4,7 vertical
//   pairs: InterSum gets |p(6) - p(7)|, IntraSum gets |p(6) - p(5)|.
//   Interlace: a 4x4 tile counts when, in every column, the signs of
//   (row0 - row1), (row2 - row1) and (row2 - row3) are all positive or all
//   negative.
// The word packing (pixel k of a microblock at bits 8k+7:8k, column-major
// numbering) and the microblock order TL, TR, BL, BR are the producer side of
// the stream format.
package vq_tb_pkg;

  typedef logic [7:0] pix8_t;
  typedef pix8_t block8_t [8][8];   // [row][col]

  function automatic logic [31:0] mix(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    logic [31:0] h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Test picture: mostly noise, with 8x8 areas that are interlaced (either
  // polarity), flat, or interlaced with one sample broken.
  function automatic pix8_t picture(int unsigned seed, int unsigned x, int unsigned y);
    logic [31:0] kind, noise;
    kind  = mix(seed, x >> 3, (y >> 3) + 32'h0001_0000) % 16;
    noise = mix(seed + 7, x, y);
    case (kind)
      0:  return pix8_t'(((y & 1) == 0 ? 170 : 60) + noise[3:0]);
      1:  return pix8_t'(((y & 1) == 0 ? 60 : 170) + noise[3:0]);
      2:  return 8'd128;
      3:  return ((x & 7) == 5 && (y & 7) == 2) ? 8'd60 :
                 pix8_t'(((y & 1) == 0 ? 170 : 60) + noise[3:0]);
      default: return noise[7:0];
    endcase
  endfunction

  function automatic void get_block(int unsigned seed, int unsigned bx, int unsigned by,
                                    output block8_t b);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        b[r][c] = picture(seed, bx * 8 + c, by * 8 + r);
  endfunction

  function automatic int unsigned adiff(pix8_t a, pix8_t b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  function automatic bit border_line(int i);
    return (i <= 4) || (i == 7);
  endfunction

  // Expected blockiness terms of the part of block b that lies in microblock q.
  function automatic void ref_blockiness(block8_t b, int q,
                                         output int unsigned intra, output int unsigned inter);
    int r0, c0;
    r0 = (q / 2) * 4;
    c0 = (q % 2) * 4;
    intra = 0;
    inter = 0;
    for (int i = 0; i < 8; i++) begin
      // horizontal pairs in row i, columns 5..7, if inside the microblock
      if (border_line(i) && i >= r0 && i < r0 + 4 && c0 == 4) begin
        intra += adiff(b[i][6], b[i][5]);
        inter += adiff(b[i][6], b[i][7]);
      end
      // vertical pairs in column i, rows 5..7
      if (border_line(i) && i >= c0 && i < c0 + 4 && r0 == 4) begin
        intra += adiff(b[6][i], b[5][i]);
        inter += adiff(b[6][i], b[7][i]);
      end
    end
  endfunction

  function automatic int sgn(pix8_t a, pix8_t b);
    return (a > b) ? 1 : (a < b) ? -1 : 0;
  endfunction

  function automatic bit ref_interlace(block8_t b, int q);
    int r0, c0, first;
    bit ok;
    r0 = (q / 2) * 4;
    c0 = (q % 2) * 4;
    first = sgn(b[r0][c0], b[r0+1][c0]);
    ok = (first != 0);
    for (int c = c0; c < c0 + 4; c++) begin
      if (sgn(b[r0][c],   b[r0+1][c]) != first) ok = 0;
      if (sgn(b[r0+2][c], b[r0+1][c]) != first) ok = 0;
      if (sgn(b[r0+2][c], b[r0+3][c]) != first) ok = 0;
    end
    return ok;
  endfunction

  // 128-bit stream word of microblock q of block b.
  function automatic logic [127:0] pack_mb(block8_t b, int q);
    logic [127:0] w;
    int r0, c0;
    r0 = (q / 2) * 4;
    c0 = (q % 2) * 4;
    w = '0;
    for (int k = 0; k < 16; k++)
      w[k*8 +: 8] = b[r0 + k % 4][c0 + k / 4];
    return w;
  endfunction

  function automatic logic [127:0] resolution_word(int unsigned w, int unsigned h);
    return {96'd0, h[15:0], w[15:0]};
  endfunction

endpackage
