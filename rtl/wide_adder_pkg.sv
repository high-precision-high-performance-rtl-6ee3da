// wide_adder_pkg: types and elaboration-time helpers shared by the wide adder.
//
// The adder splits a very wide addition into segments, produces one
// generate/propagate pair per segment, resolves the segment carries in a
// parallel-prefix network and adds the carries back in per segment.
// This package holds:
//   * prefix_e    - the four prefix-network topologies (Brent-Kung,
//                   Han-Carlson, Kogge-Stone, Sklansky);
//   * arch_t      - the segment architecture number (1..6), which selects
//                   how G/P are formed and what travels to the output stage;
//   * constant functions giving the number of logic levels of a topology,
//                   the partner node of each prefix cell, and the number of
//                   pipeline registers placed after each level (registers are
//                   spread evenly over the logic depth of the network).
// Nothing here is clocked; all functions are evaluated at elaboration.
package wide_adder_pkg;

  typedef enum logic [1:0] {
    PFX_BRENT_KUNG  = 2'd0,
    PFX_HAN_CARLSON = 2'd1,
    PFX_KOGGE_STONE = 2'd2,
    PFX_SKLANSKY    = 2'd3
  } prefix_e;

  typedef int unsigned arch_t;

  // Ceiling log2 for n >= 1 (0 for n == 1).
  function automatic int unsigned clog2i(input int unsigned n);
    int unsigned r = 0;
    while ((32'd1 << r) < n) r++;
    return r;
  endfunction

  // Number of combining levels of a prefix network over n nodes.
  function automatic int unsigned prefix_levels(input prefix_e kind, input int unsigned n);
    int unsigned l = clog2i(n);
    if (n < 2) return 0;
    case (kind)
      PFX_BRENT_KUNG:  return 2 * l - 1;
      PFX_HAN_CARLSON: return l + 1;
      default:         return l;        // Kogge-Stone, Sklansky
    endcase
  endfunction

  // Node that node i combines with at level lev, or -1 if node i only
  // passes its (G,P) pair through that level. The partner always has a
  // lower index: (G,P)[i] <= (G,P)[i] o (G,P)[partner].
  function automatic int prefix_partner(input prefix_e kind, input int unsigned n,
                                        input int unsigned lev, input int i);
    int unsigned l = clog2i(n);
    int d;
    case (kind)
      PFX_BRENT_KUNG: begin
        if (lev < l) begin
          // up-sweep: stride 2^lev, nodes at the end of each 2^(lev+1) block
          d = 1 << lev;
          if (((i + 1) % (2 * d)) == 0) return i - d;
        end else begin
          // down-sweep: strides 2^(l-2) down to 1
          d = 1 << (2 * l - 2 - lev);
          if ((((i + 1) % (2 * d)) == d) && ((i + 1) > 2 * d)) return i - d;
        end
      end
      PFX_HAN_CARLSON: begin
        if (lev == 0) begin
          if ((i % 2) == 1) return i - 1;
        end else if (lev < l) begin
          d = 1 << lev;
          if (((i % 2) == 1) && (i >= d)) return i - d;
        end else begin
          if (((i % 2) == 0) && (i >= 2)) return i - 1;
        end
      end
      PFX_KOGGE_STONE: begin
        d = 1 << lev;
        if (i >= d) return i - d;
      end
      default: begin  // Sklansky
        if (((i >> lev) & 1) == 1) return ((i >> lev) << lev) - 1;
      end
    endcase
    return -1;
  endfunction

  // Pipeline registers placed after logic level lev (0-based) when 'stages'
  // registers are spread evenly over 'levels' levels of logic.
  function automatic int unsigned regs_after_level(input int unsigned levels,
                                                   input int unsigned stages,
                                                   input int unsigned lev);
    return ((lev + 1) * stages) / levels - (lev * stages) / levels;
  endfunction

  // Register stages in the segment (input) stage of each architecture:
  // one for 1, 2 and 5; two where P (3, 4) or G (6) follows the other.
  function automatic int unsigned input_stages(input arch_t arch);
    return (arch == 3 || arch == 4 || arch == 6) ? 2 : 1;
  endfunction

  // Width of the per-segment word forwarded to the output stage:
  // both operands (1) or both candidate sums (5), otherwise one sum.
  function automatic int unsigned fwd_width(input arch_t arch, input int unsigned w);
    return (arch == 1 || arch == 5) ? 2 * w : w;
  endfunction

endpackage
