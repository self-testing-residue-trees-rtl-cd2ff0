// residue_tree - totally self-checking residue generator modulo an odd A.
//
// Computes |n|_A of a WIDTH-bit binary number n and presents it in the
// 1-out-of-A code. Internally every signal between cells is also 1-out-of-A
// coded, which makes the network free of inverters past the first rank and
// totally self-checking for single stuck-at faults: while fault-free the
// output always has exactly one line high, a single fault can never turn the
// output into a wrong code word, and every such fault turns the output into a
// non-code word (no line or several lines high) for some input number.
//
// Structure:
//   * First rank: the input is cut into bytes; byte b (bits lo..lo+w-1) feeds
//     a mod_reduce (|x|_A) cell that outputs |B_b * 2^lo|_A. Bytes are BYTE_W
//     bits from the least significant end, the WIDE most significant bytes
//     are BYTE_W+1 bits, and bits left over at the top go to the most
//     significant byte. Every byte must be at least ceil(log2 A) bits.
//   * Second rank: +A cells add the byte residues. SHAPE = TREE_BALANCED
//     pairs neighbours level by level (byte 0 with byte 1, byte 2 with byte 3,
//     ...); an odd node left at the end of a level passes to the next level.
//     SHAPE = TREE_CHAIN adds the bytes one after another starting from the
//     least significant one, so the most significant byte is one cell from
//     the output (suits an operand whose high bits settle last).
//     SHAPE = TREE_COMPLETE builds a tree of minimum depth in which only the
//     least significant bytes go through the deepest level: the lowest
//     2*(NB-P2) bytes are added in pairs first (P2 the largest power of two
//     not above the byte count NB), then the P2 resulting nodes are paired
//     level by level. For ten bytes this is the arrangement of the 32-bit
//     modulo-5 example with a 5-bit top byte.
//   * LEVEL_MERGE = 0 uses AND-OR cells (mod_add_andor) throughout.
//     LEVEL_MERGE = 1 uses OR-AND cells (mod_add_orand) in the first +A layer
//     and every odd layer after it, AND-OR cells in the even layers, so that
//     adjacent OR levels and AND levels can be collapsed by synthesis.
//
// Interface: n (WIDTH bits), r (A lines, r[i] = 1 iff |n|_A = i).
// Timing: purely combinational; the depth is one decode level plus two gate
// levels per cell on the path (about one per cell after level merging).
//
// Byte cutting, the balanced, chained and complete trees and the alternating
// layers follow the described design. The default 16-bit, 4-bit-byte, modulo-3
// configuration is the worked example; which layer starts the alternation
// and the rule for uneven byte counts are this implementation's choices.
module residue_tree
  import residue_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,             // input number width
  parameter int unsigned A           = 3,              // odd modulus
  parameter int unsigned BYTE_W      = 4,              // nominal byte width
  parameter int unsigned WIDE        = 0,              // MS bytes of BYTE_W+1 bits
  parameter tree_shape_e SHAPE       = TREE_BALANCED,  // +A cell arrangement
  parameter bit          LEVEL_MERGE = 1'b0            // alternate OR-AND/AND-OR layers
) (
  input  logic [WIDTH-1:0] n,
  output logic [A-1:0]     r
);

  localparam int unsigned NB   = byte_count(WIDTH, BYTE_W, WIDE);
  localparam int unsigned NLEV = lvl_levels(NB);
  // Flat node array: leaves 0..NB-1, then the +A cell outputs.
  localparam int unsigned NNODE = tree_nodes(SHAPE, NB);
  // TREE_COMPLETE: P2 nodes enter the perfect part, XC extra cells come first.
  localparam int unsigned P2   = pow2_floor(NB);
  localparam int unsigned XC   = NB - P2;
  localparam int unsigned PLEV = $clog2(P2);

  logic [A-1:0] node [NNODE];

  // ---- first rank: |x|_A cells ------------------------------------------
  for (genvar b = 0; b < NB; b++) begin : g_byte
    localparam int unsigned LO = byte_lo(b, WIDTH, BYTE_W, WIDE);
    localparam int unsigned BW = byte_width(b, WIDTH, BYTE_W, WIDE);
    mod_reduce #(.A(A), .W(BW), .SHIFT(LO)) u_red (
      .x (n[LO +: BW]),
      .r (node[b])
    );
  end

  // ---- second rank: +A cells --------------------------------------------
  if (SHAPE == TREE_CHAIN) begin : g_chain
    // Chain node NB+k adds byte k+1 to the running sum (node NB+k-1, or
    // byte 0 for k = 0). Layer number is k+1.
    for (genvar k = 0; k + 1 < NB; k++) begin : g_step
      localparam int unsigned PREV = (k == 0) ? 0 : NB + k - 1;
      if (LEVEL_MERGE && (k % 2 == 0)) begin : g_oa
        mod_add_orand #(.A(A)) u_add (.x(node[k + 1]), .y(node[PREV]), .r(node[NB + k]));
      end else begin : g_ao
        mod_add_andor #(.A(A)) u_add (.x(node[k + 1]), .y(node[PREV]), .r(node[NB + k]));
      end
    end
  end else if (SHAPE == TREE_COMPLETE) begin : g_cpl
    // Extra cells (layer 1): node NB+j adds bytes 2j+1 and 2j.
    for (genvar j = 0; j < XC; j++) begin : g_extra
      if (LEVEL_MERGE) begin : g_oa
        mod_add_orand #(.A(A)) u_add (.x(node[2 * j + 1]), .y(node[2 * j]), .r(node[NB + j]));
      end else begin : g_ao
        mod_add_andor #(.A(A)) u_add (.x(node[2 * j + 1]), .y(node[2 * j]), .r(node[NB + j]));
      end
    end
    // Perfect part: entry e of its first level is extra cell e (e < XC) or
    // byte e+XC. Level t (1..PLEV) writes P2>>t nodes from index
    // NB+XC+P2-(P2>>(t-1)); its layer number is t, plus one if extra cells exist.
    for (genvar t = 1; t <= PLEV; t++) begin : g_lvl
      localparam int unsigned OOUT  = NB + XC + P2 - (P2 >> (t - 1));
      localparam int unsigned OIN   = (t > 1) ? NB + XC + P2 - (P2 >> (t - 2)) : 0;
      localparam int unsigned LAYER = t + ((XC > 0) ? 1 : 0);
      for (genvar i = 0; i < (P2 >> t); i++) begin : g_node
        localparam int unsigned XI = (t > 1) ? OIN + 2 * i + 1
                                   : ((2 * i + 1 < XC) ? NB + 2 * i + 1 : 2 * i + 1 + XC);
        localparam int unsigned YI = (t > 1) ? OIN + 2 * i
                                   : ((2 * i < XC) ? NB + 2 * i : 2 * i + XC);
        if (LEVEL_MERGE && (LAYER % 2 == 1)) begin : g_oa
          mod_add_orand #(.A(A)) u_add (.x(node[XI]), .y(node[YI]), .r(node[OOUT + i]));
        end else begin : g_ao
          mod_add_andor #(.A(A)) u_add (.x(node[XI]), .y(node[YI]), .r(node[OOUT + i]));
        end
      end
    end
  end else begin : g_bal
    for (genvar l = 1; l < NLEV; l++) begin : g_lvl
      localparam int unsigned CIN  = lvl_count(l - 1, NB);
      localparam int unsigned OIN  = lvl_offset(l - 1, NB);
      localparam int unsigned OOUT = lvl_offset(l, NB);
      for (genvar i = 0; i < lvl_count(l, NB); i++) begin : g_node
        if (2 * i + 1 < CIN) begin : g_cell
          // Left (X) operand is the more significant of the pair.
          if (LEVEL_MERGE && (l % 2 == 1)) begin : g_oa
            mod_add_orand #(.A(A)) u_add (
              .x(node[OIN + 2 * i + 1]), .y(node[OIN + 2 * i]), .r(node[OOUT + i]));
          end else begin : g_ao
            mod_add_andor #(.A(A)) u_add (
              .x(node[OIN + 2 * i + 1]), .y(node[OIN + 2 * i]), .r(node[OOUT + i]));
          end
        end else begin : g_pass
          assign node[OOUT + i] = node[OIN + 2 * i];
        end
      end
    end
  end

  assign r = node[NNODE - 1];

  initial begin
    assert (A % 2 == 1) else $error("residue_tree: modulus A=%0d must be odd", A);
    assert (2 ** BYTE_W >= A) else $error("residue_tree: BYTE_W=%0d too narrow for A=%0d", BYTE_W, A);
  end

endmodule
