// tb_wimax_ref_pkg: reference model for the interleaver testbenches.
//
// Computes the IEEE 802.16e interleaver and deinterleaver permutations directly
// from their defining two-step formulas, with integer division standing in for
// the floor function, so that the RTL (which avoids division) is checked
// against an independent model. Also lists the permitted depths per
// modulation and code rate.
//   interleaver   : m = (N/d)*(k%d) + k/d
//                   jk = s*(m/s) + (m + N - (d*m)/N) % s
//   deinterleaver : m = s*(j/s) + (j + (d*j)/N) % s
//                   kj = d*m - (N-1)*((d*m)/N)
// with d = 16 columns and s = bits per subcarrier / 2 (1, 2, 3).
package tb_wimax_ref_pkg;

  localparam int REF_D = 16;

  typedef struct {
    int mod_typ;   // 0 QPSK, 1 16-QAM, 2 64-QAM
    int code_rate; // 0 = 1/2, 1 = 2/3, 2 = 3/4
    int idx;       // position in the list of depths of that modulation/rate
    int ncbps;
  } cfg_t;

  localparam int NCFG = 19;

  function automatic cfg_t cfg_at(int n);
    cfg_t t [NCFG] = '{
      '{0, 0, 0,  96}, '{0, 0, 1, 192}, '{0, 0, 2, 288}, '{0, 0, 3, 384},
      '{0, 0, 4, 480}, '{0, 0, 5, 576},
      '{0, 2, 0, 144}, '{0, 2, 1, 288}, '{0, 2, 2, 432}, '{0, 2, 3, 576},
      '{1, 0, 0, 192}, '{1, 0, 1, 384}, '{1, 0, 2, 576},
      '{1, 2, 0, 288}, '{1, 2, 1, 576},
      '{2, 0, 0, 288}, '{2, 0, 1, 576},
      '{2, 1, 0, 384},
      '{2, 2, 0, 432}
    };
    return t[n];
  endfunction

  // Depth for a configuration, 0 when it is not permitted.
  function automatic int ref_depth(int mod_typ, int code_rate, int idx);
    for (int n = 0; n < NCFG; n++) begin
      cfg_t c = cfg_at(n);
      if (c.mod_typ == mod_typ && c.code_rate == code_rate && c.idx == idx)
        return c.ncbps;
    end
    return 0;
  endfunction

  function automatic int ref_s(int mod_typ);
    return mod_typ + 1;
  endfunction

  // Interleaved position of input bit k.
  function automatic int ref_jk(int k, int n, int s);
    int m;
    m = (n / REF_D) * (k % REF_D) + k / REF_D;
    return s * (m / s) + (m + n - (REF_D * m) / n) % s;
  endfunction

  // Deinterleaved position of received bit j.
  function automatic int ref_kj(int j, int n, int s);
    int m;
    m = s * (j / s) + (j + (REF_D * j) / n) % s;
    return REF_D * m - (n - 1) * ((REF_D * m) / n);
  endfunction

endpackage
