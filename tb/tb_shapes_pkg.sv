// tb_shapes_pkg: reference block pictures for the testbenches.
//
// Each block code is drawn as a 4x4 picture around its anchor: picture row
// i is offset dr = i-1 and picture column j is offset dc = j-1, so the
// anchor is at (1,1). The 16-bit value lists the rows top first, each row
// with its leftmost cell as the most significant bit. ref_mask places a
// picture on the 20x10 field the way the playfield numbers its cells
// (bit r*10+c) and reports cells that fall outside.
// The pictures are drawn independently of the RTL's offset table, from
// the block model list as this design reads it.
package tb_shapes_pkg;

  function automatic logic [15:0] ref_bitmap(input int code);
    case (code)
      0:  return 16'b0000_0110_0110_0000;  // A1
      1:  return 16'b0100_0100_0110_0000;  // B1
      2:  return 16'b0010_1110_0000_0000;  // B2
      3:  return 16'b1100_0100_0100_0000;  // B3
      4:  return 16'b0000_1110_1000_0000;  // B4
      5:  return 16'b0100_0100_1100_0000;  // C1
      6:  return 16'b0000_1110_0010_0000;  // C2
      7:  return 16'b0110_0100_0100_0000;  // C3
      8:  return 16'b1000_1110_0000_0000;  // C4
      9:  return 16'b0100_0100_0100_0100;  // D1
      10: return 16'b0000_1111_0000_0000;  // D2
      11: return 16'b0100_1110_0000_0000;  // E1
      12: return 16'b0100_1100_0100_0000;  // E2
      13: return 16'b0000_1110_0100_0000;  // E3
      14: return 16'b0100_0110_0100_0000;  // E4
      15: return 16'b0100_1100_1000_0000;  // F1
      16: return 16'b0000_1100_0110_0000;  // F2
      17: return 16'b0100_0110_0010_0000;  // G1
      18: return 16'b0110_1100_0000_0000;  // G2
      default: return 16'h0000;
    endcase
  endfunction

  function automatic bit ref_cell(input int code, input int dr, input int dc);
    logic [15:0] b;
    if (dr < -1 || dr > 2 || dc < -1 || dc > 2) return 1'b0;
    b = ref_bitmap(code);
    return b[15 - ((dr + 1) * 4 + (dc + 1))];
  endfunction

  function automatic logic [199:0] ref_mask(input int code, input int n, input int m,
                                            output bit oob);
    logic [199:0] k;
    k   = '0;
    oob = 1'b0;
    for (int dr = -1; dr <= 2; dr++)
      for (int dc = -1; dc <= 2; dc++)
        if (ref_cell(code, dr, dc)) begin
          if (n + dr < 0 || n + dr > 19 || m + dc < 0 || m + dc > 9) oob = 1'b1;
          else k[(n + dr) * 10 + m + dc] = 1'b1;
        end
    return k;
  endfunction

  // Shape group 1..7 of a code (A..G).
  function automatic int ref_group(input int code);
    if (code == 0)  return 1;
    if (code <= 4)  return 2;
    if (code <= 8)  return 3;
    if (code <= 10) return 4;
    if (code <= 14) return 5;
    if (code <= 16) return 6;
    return 7;
  endfunction

endpackage
