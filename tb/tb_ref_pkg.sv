// Reference models shared by the testbenches.
//
// ref_eval evaluates a chromosome the slow way, one gate at a time with
// integer arrays, without using any RTL. fig4_chrom encodes the published
// 10x10 evolved circuit (gate types and the two input indices of every gate,
// levels 0..9, rows 0..9) as a chromosome in the layout of evo_circuit.
// rand_chrom makes a random chromosome whose index fields stay below M.
package tb_ref_pkg;

  localparam int MAXL = 4096;
  typedef logic [MAXL-1:0] chrom_t;

  // Gate codes: NOT AND OR XOR NAND NOR XNOR WIRE = 0..7.
  function automatic int gate_code(string g);
    case (g)
      "NOT":  return 0;
      "AND":  return 1;
      "OR":   return 2;
      "XOR":  return 3;
      "NAND": return 4;
      "NOR":  return 5;
      "XNOR": return 6;
      default: return 7; // WIRE
    endcase
  endfunction

  function automatic int iw(int m);
    int w = 1;
    while ((1 << w) < m) w++;
    return w;
  endfunction

  function automatic int row_len(int m, int n);
    return 3 + (n - 1) * (2 * iw(m) + 3);
  endfunction

  function automatic int get_field(chrom_t c, int pos, int width);
    int v = 0;
    for (int k = 0; k < width; k++) if (c[pos + k]) v += (1 << k);
    return v;
  endfunction

  function automatic chrom_t put_field(chrom_t c, int pos, int width, int v);
    for (int k = 0; k < width; k++) c[pos + k] = ((v >> k) & 1) != 0;
    return c;
  endfunction

  function automatic bit apply(int g, bit a, bit b);
    case (g)
      0: return !a;
      1: return a && b;
      2: return a || b;
      3: return a != b;
      4: return !(a && b);
      5: return !(a || b);
      6: return a == b;
      default: return a;
    endcase
  endfunction

  // in_bits: bit 2r and 2r+1 feed level-0 gate r. Returns the M outputs.
  function automatic logic [63:0] ref_eval(chrom_t c, int m, int n, logic [127:0] in_bits);
    bit cur [64];
    bit nxt [64];
    int w = iw(m);
    int rl = row_len(m, n);
    logic [63:0] res = '0;
    for (int r = 0; r < m; r++)
      cur[r] = apply(get_field(c, r*rl, 3), in_bits[2*r], in_bits[2*r+1]);
    for (int l = 1; l < n; l++) begin
      for (int r = 0; r < m; r++) begin
        int base = r*rl + 3 + (l-1)*(2*w+3);
        int i1 = get_field(c, base, w);
        int i2 = get_field(c, base + w, w);
        bit a = (i1 < m) ? cur[i1] : 1'b0;
        bit b = (i2 < m) ? cur[i2] : 1'b0;
        nxt[r] = apply(get_field(c, base + 2*w, 3), a, b);
      end
      for (int r = 0; r < m; r++) cur[r] = nxt[r];
    end
    for (int r = 0; r < m; r++) res[r] = cur[r];
    return res;
  endfunction

  // Published 10x10 point-addition circuit. Per level: ten entries
  // "IP1 IP2 GATE" for rows 0..9 (level 0: gate type only).
  function automatic chrom_t fig4_chrom();
    string l0 [10] = '{"OR","AND","XNOR","NAND","AND","OR","WIRE","NOT","AND","WIRE"};
    int    ip [9][10][2] = '{
      '{'{4,9},'{7,1},'{4,5},'{6,4},'{1,9},'{3,6},'{5,4},'{3,0},'{6,4},'{9,3}},
      '{'{1,7},'{9,5},'{7,0},'{4,5},'{0,4},'{9,2},'{9,4},'{3,7},'{0,5},'{1,2}},
      '{'{0,8},'{5,0},'{4,6},'{3,1},'{0,2},'{1,6},'{0,7},'{9,8},'{8,4},'{8,0}},
      '{'{0,4},'{7,4},'{1,2},'{2,7},'{2,9},'{4,4},'{3,2},'{6,9},'{3,2},'{0,5}},
      '{'{0,4},'{1,5},'{2,8},'{6,7},'{5,2},'{2,1},'{5,4},'{8,1},'{4,1},'{1,7}},
      '{'{8,0},'{9,0},'{1,6},'{3,0},'{6,2},'{0,1},'{4,2},'{9,2},'{9,2},'{0,0}},
      '{'{8,0},'{3,3},'{1,5},'{1,9},'{4,5},'{1,8},'{5,0},'{0,0},'{4,5},'{2,7}},
      '{'{4,0},'{9,1},'{2,2},'{0,1},'{2,1},'{4,6},'{9,4},'{0,1},'{2,5},'{4,2}},
      '{'{3,9},'{7,4},'{5,5},'{4,3},'{3,5},'{8,2},'{5,3},'{1,4},'{2,3},'{2,9}}};
    string gt [9][10] = '{
      '{"OR","AND","XNOR","NAND","AND","OR","WIRE","NOT","AND","WIRE"},
      '{"AND","NOR","OR","WIRE","WIRE","NOT","NOR","NOT","NOR","WIRE"},
      '{"NOR","XNOR","NOR","XNOR","NOR","XNOR","OR","XNOR","XOR","XOR"},
      '{"WIRE","XOR","NAND","NOR","WIRE","NAND","NOR","NOT","NOR","AND"},
      '{"XNOR","AND","WIRE","XNOR","NOT","NOR","NOT","AND","NOT","WIRE"},
      '{"NOR","AND","OR","XNOR","NAND","OR","NAND","XNOR","NOR","NOR"},
      '{"XNOR","NOT","NAND","NAND","NOT","WIRE","NAND","OR","XNOR","WIRE"},
      '{"WIRE","XNOR","OR","OR","AND","WIRE","OR","OR","WIRE","OR"},
      '{"NOT","XOR","XOR","NOT","NOR","XNOR","NOR","OR","WIRE","NAND"}};
    chrom_t c = '0;
    int rl = row_len(10, 10);
    for (int r = 0; r < 10; r++) begin
      c = put_field(c, r*rl, 3, gate_code(l0[r]));
      for (int l = 1; l < 10; l++) begin
        int base = r*rl + 3 + (l-1)*11;
        c = put_field(c, base,     4, ip[l-1][r][0]);
        c = put_field(c, base + 4, 4, ip[l-1][r][1]);
        c = put_field(c, base + 8, 3, gate_code(gt[l-1][r]));
      end
    end
    return c;
  endfunction

  function automatic chrom_t rand_chrom(int m, int n);
    chrom_t c = '0;
    int w = iw(m);
    int rl = row_len(m, n);
    for (int r = 0; r < m; r++) begin
      c = put_field(c, r*rl, 3, int'($urandom_range(0, 7)));
      for (int l = 1; l < n; l++) begin
        int base = r*rl + 3 + (l-1)*(2*w+3);
        c = put_field(c, base,       w, int'($urandom_range(0, m-1)));
        c = put_field(c, base + w,   w, int'($urandom_range(0, m-1)));
        c = put_field(c, base + 2*w, 3, int'($urandom_range(0, 7)));
      end
    end
    return c;
  endfunction

  // Level-0 input bits for two (x, y) operands of cw bits each.
  function automatic logic [127:0] pack_in(int cw, int ax, int ay, int bx, int by);
    logic [127:0] v = '0;
    for (int r = 0; r < cw; r++) begin
      v[2*r]          = ((ax >> r) & 1) != 0;
      v[2*r+1]        = ((ay >> r) & 1) != 0;
      v[2*(cw+r)]     = ((bx >> r) & 1) != 0;
      v[2*(cw+r)+1]   = ((by >> r) & 1) != 0;
    end
    return v;
  endfunction

endpackage
