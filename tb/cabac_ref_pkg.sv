// cabac_ref_pkg: reference H.264/AVC CABAC arithmetic encoder for testbenches.
//
// The encoder follows the bit-serial procedure of the standard (EncodeDecision,
// EncodeBypass, EncodeTerminate with flush, PutBit with outstanding bits) and
// produces the bitstream as a queue of bits. Testbenches encode random bins
// with it and check that the hardware decoder recovers them. It also keeps its
// own copy of each context model and updates it with the standard rule, so the
// expected CM values are worked out independently of the decoder.
package cabac_ref_pkg;
  import cabac_pkg::*;

  class cabac_enc;
    bit      bits[$];
    int      low;
    int      rng;
    int      outstanding;
    bit      first;

    function new();
      low = 0; rng = 510; outstanding = 0; first = 1; bits.delete();
    endfunction

    function void put_bit(bit b);
      if (first) first = 0;
      else bits.push_back(b);
      while (outstanding > 0) begin
        bits.push_back(!b);
        outstanding--;
      end
    endfunction

    function void renorm();
      while (rng < 256) begin
        if (low < 256) put_bit(0);
        else if (low >= 512) begin low -= 512; put_bit(1); end
        else begin low -= 256; outstanding++; end
        rng = rng << 1;
        low = low << 1;
      end
    endfunction

    // Encode one regular bin with model m; m is updated in place.
    function void encode_decision(ref cm_t m, input bit b);
      int q, rl;
      q  = (rng >> 6) & 3;
      rl = int'(rlps(m.state, 2'(q)));
      rng -= rl;
      if (b != m.mps) begin
        low += rng;
        rng = rl;
        if (m.state == 0) m.mps = !m.mps;
        m.state = trans_lps(m.state);
      end else begin
        m.state = trans_mps(m.state);
      end
      renorm();
    endfunction

    function void encode_bypass(bit b);
      low = low << 1;
      if (b) low += rng;
      if (low >= 1024) begin put_bit(1); low -= 1024; end
      else if (low < 512) put_bit(0);
      else begin low -= 512; outstanding++; end
    endfunction

    function void encode_terminate(bit b);
      rng -= 2;
      if (b) begin
        low += rng;
        rng = 2;
        renorm();
        put_bit(1'((low >> 9) & 1));
        bits.push_back(1'((low >> 8) & 1));
        bits.push_back(1'b1);
      end else begin
        renorm();
      end
    endfunction
  endclass

endpackage
