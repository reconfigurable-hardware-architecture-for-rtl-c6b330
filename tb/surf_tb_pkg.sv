// surf_tb_pkg: reference function shared by the accelerator model and the
// testbenches. A real SURF accelerator computes 64 Haar-wavelet sums from
// the image around the interest point; the model replaces them with a hash of
// the interest point record and the word index, which is enough to check
// that every descriptor reaches the right place in the output memories.
package surf_tb_pkg;
  import surf_pkg::*;

  function automatic desc_word_t ref_desc_word(ip_t ip, int w);
    logic [31:0] h;
    h = {ip.x, ip.y} ^ {ip.orient, ip.scale};
    h = h * 32'h9E37_79B1 + 32'(w) * 32'h85EB_CA6B;
    return h ^ (h >> 15);
  endfunction

  function automatic ip_t rand_ip();
    return ip_t'({$urandom, $urandom});
  endfunction
endpackage
