// sc_pkg: types and elaboration-time helpers shared by the stochastic
// computing (SC) filter blocks.
//
// * rns_kind_e selects which random-number-source architecture a filter is
//   built with: an LFSR per stochastic number generator, a Sobol
//   (low-discrepancy) generator per stochastic number generator, or the
//   correlation-enhanced multiplexer (CeMux) arrangement with one shared
//   LFSR and a counter driving the mux-tree selects.
// * lfsr_taps() returns the feedback tap mask of a maximal-length Fibonacci
//   LFSR for widths 3..16 (standard primitive polynomials). The tap choice is
//   this design's own; the source only asks for a maximal-length LFSR.
// * sobol_dir() returns the direction numbers v_1..v_K of one Sobol
//   dimension, scaled to K bits. Dimension 0 is the van der Corput
//   sequence; dimensions 1..7 use the first primitive polynomials and initial
//   odd numbers of the widely used Joe-Kuo tables. Every dimension is a
//   permutation of 0..2^K-1 over one period of 2^K outputs.
package sc_pkg;

  typedef enum logic [1:0] {
    RNS_LFSR  = 2'd0,
    RNS_SOBOL = 2'd1,
    RNS_CEMUX = 2'd2
  } rns_kind_e;

  localparam int unsigned MAX_K      = 16;

  // Tap mask, bit (t-1) set for every tap t of the feedback polynomial.
  function automatic logic [MAX_K-1:0] lfsr_taps(input int unsigned k);
    logic [MAX_K-1:0] m;
    m = '0;
    case (k)
      3:  begin m[2] = 1'b1; m[1] = 1'b1; end
      4:  begin m[3] = 1'b1; m[2] = 1'b1; end
      5:  begin m[4] = 1'b1; m[2] = 1'b1; end
      6:  begin m[5] = 1'b1; m[4] = 1'b1; end
      7:  begin m[6] = 1'b1; m[5] = 1'b1; end
      8:  begin m[7] = 1'b1; m[5] = 1'b1; m[4] = 1'b1; m[3] = 1'b1; end
      9:  begin m[8] = 1'b1; m[4] = 1'b1; end
      10: begin m[9] = 1'b1; m[6] = 1'b1; end
      11: begin m[10] = 1'b1; m[8] = 1'b1; end
      12: begin m[11] = 1'b1; m[5] = 1'b1; m[3] = 1'b1; m[0] = 1'b1; end
      13: begin m[12] = 1'b1; m[3] = 1'b1; m[2] = 1'b1; m[0] = 1'b1; end
      14: begin m[13] = 1'b1; m[4] = 1'b1; m[2] = 1'b1; m[0] = 1'b1; end
      15: begin m[14] = 1'b1; m[13] = 1'b1; end
      default: begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3] = 1'b1; end
    endcase
    return m;
  endfunction

  // Degree s, coefficient bits a (a_1 is the MSB of the s-1 bits) and the
  // initial odd numbers m_1..m_s of each Sobol dimension.
  function automatic int unsigned sobol_deg(input int unsigned d);
    case (d)
      1: return 1;
      2: return 2;
      3, 4: return 3;
      5, 6: return 4;
      default: return 5;
    endcase
  endfunction

  function automatic int unsigned sobol_a(input int unsigned d);
    case (d)
      2: return 1;
      3: return 1;
      4: return 2;
      5: return 1;
      6: return 4;
      7: return 2;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned sobol_m0(input int unsigned d, input logic [2:0] i);
    int unsigned t [5];
    case (d)
      1: t = '{1, 1, 1, 1, 1};
      2: t = '{1, 3, 1, 1, 1};
      3: t = '{1, 3, 1, 1, 1};
      4: t = '{1, 1, 1, 1, 1};
      5: t = '{1, 1, 3, 3, 1};
      6: t = '{1, 3, 5, 13, 1};
      default: t = '{1, 1, 5, 5, 17};
    endcase
    return t[i];
  endfunction

  // Direction number v_j (j = 1..k) of dimension d, as a k-bit integer:
  // v_j = m_j * 2^(k-j), with the m_j from the primitive-polynomial
  // recurrence m_j = 2a_1 m_(j-1) ^ 4a_2 m_(j-2) ^ ... ^ 2^s m_(j-s) ^ m_(j-s).
  function automatic int unsigned sobol_dir(input int unsigned d,
                                            input int unsigned j,
                                            input int unsigned k);
    int unsigned m [MAX_K+1];
    int unsigned s, a;
    if (d == 0) return 1 << (k - j);
    s = sobol_deg(d);
    a = sobol_a(d);
    m[0] = 0;
    for (int unsigned i = 1; i <= MAX_K; i++) begin
      if (i <= s) begin
        m[i] = sobol_m0(d, 3'(i - 1));
      end else begin
        m[i] = m[i-s] ^ (m[i-s] << s);
        for (int unsigned q = 1; q < s; q++)
          if (((a >> (s - 1 - q)) & 1) != 0)
            m[i] = m[i] ^ (m[i-q] << q);
      end
    end
    return m[j] << (k - j);
  endfunction

endpackage
