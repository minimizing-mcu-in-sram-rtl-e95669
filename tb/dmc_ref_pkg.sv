// dmc_ref_pkg: reference model of the 32-bit decimal matrix code used by the
// testbenches. Written directly from the code equations, one line per
// horizontal group, independently of the RTL's generic indexing:
//   H4..H0 = D3..D0 + D11..D8,     H9..H5 = D7..D4 + D15..D12,
//   H14..H10 = D19..D16 + D27..D24, H19..H15 = D23..D20 + D31..D28,
//   V[i] = D[i] ^ D[i+16].
package dmc_ref_pkg;

  function automatic logic [19:0] ref_h(input logic [31:0] d);
    logic [4:0] h0, h1, h2, h3;
    h0 = 5'(d[3:0])   + 5'(d[11:8]);
    h1 = 5'(d[7:4])   + 5'(d[15:12]);
    h2 = 5'(d[19:16]) + 5'(d[27:24]);
    h3 = 5'(d[23:20]) + 5'(d[31:28]);
    return {h3, h2, h1, h0};
  endfunction

  function automatic logic [15:0] ref_v(input logic [31:0] d);
    logic [15:0] v;
    for (int i = 0; i < 16; i++) v[i] = d[i] ^ d[i+16];
    return v;
  endfunction

  // Horizontal group of a data bit: symbols {0,2}->0, {1,3}->1, {4,6}->2, {5,7}->3.
  function automatic int ref_group(input int bit_idx);
    int sym;
    sym = bit_idx / 4;
    case (sym)
      0, 2: return 0;
      1, 3: return 1;
      4, 6: return 2;
      default: return 3;
    endcase
  endfunction

  // Whether the code corrects data-bit error pattern e on word d. Three
  // conditions: every horizontal group touched changes its sum; no bit column
  // is hit in both rows (the column XOR would cancel); and no hit column lies,
  // in the other row, under a symbol whose group sum changed (that symbol
  // would be blamed for the column as well).
  function automatic bit ref_correctable(input logic [31:0] d, input logic [31:0] e);
    logic [19:0] h_a, h_b;
    logic [3:0]  touched, changed;
    h_a = ref_h(d);
    h_b = ref_h(d ^ e);
    touched = '0;
    for (int j = 0; j < 32; j++) if (e[j]) touched[ref_group(j)] = 1'b1;
    for (int g = 0; g < 4; g++) changed[g] = (h_a[g*5 +: 5] != h_b[g*5 +: 5]);
    if (touched != changed) return 1'b0;
    for (int c = 0; c < 16; c++) begin
      if (e[c] && e[c+16]) return 1'b0;
      if (e[c] && changed[ref_group(c+16)]) return 1'b0;
      if (e[c+16] && changed[ref_group(c)]) return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
