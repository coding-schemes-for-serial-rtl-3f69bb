// eti_ref_pkg: reference model of the ETI code for the testbenches.
//
// Works word by word, independently of the RTL structure:
//  * count_tr: transitions between neighbouring bits of a word (MSB sent first);
//  * inv_mask: the bits the bit-two inverter flips (every second bit sent);
//  * build_link: for a list of words sent back to back, the decision and coded
//    value of each word, the line as a list of half-cycle samples (two per
//    cycle: after the rising edge, after the falling edge), and what the
//    receiver must conclude: a word whose line window (its own bits plus the
//    change from the previous bit) has no transition carries no phase, and the
//    receiver keeps the previous decision for it.
// The line of word w starts in cycle t0 + w*wl. Before that the line is 0.
package eti_ref_pkg;

  function automatic int count_tr(input logic [31:0] w, input int wl);
    int n = 0;
    for (int i = 1; i < wl; i++) if (w[wl-1-i] != w[wl-i]) n++;
    return n;
  endfunction

  function automatic logic [31:0] inv_mask(input int wl);
    logic [31:0] m = '0;
    for (int k = 1; k < wl; k += 2) m[wl-1-k] = 1'b1;
    return m;
  endfunction

  typedef struct {
    logic [31:0] word;
    logic [31:0] coded;
    bit          dec;      // encoder decision
    bit          held;     // no transition in the window
    bit          rx_dec;   // decision the receiver must recover
    logic [31:0] rx_word;  // word the receiver must deliver
  } word_t;

  // line[2*n + h]: value in cycle n, half h
  function automatic void build_link(input logic [31:0] words[$], input int wl, input int nth,
                                     input int t0, ref word_t info[$], ref bit line[$]);
    bit prev_bit = 1'b0, prev_rx = 1'b0;
    info.delete();
    line.delete();
    for (int n = 0; n < t0; n++) begin line.push_back(1'b0); line.push_back(1'b0); end
    foreach (words[w]) begin
      word_t e;
      bit any = 1'b0;
      e.word  = words[w];
      e.dec   = (count_tr(words[w], wl) >= nth);
      e.coded = e.dec ? (words[w] ^ inv_mask(wl)) : words[w];
      for (int k = 0; k < wl; k++) begin
        bit b = e.coded[wl-1-k];
        bit prior = (k == 0) ? prev_bit : e.coded[wl-k];
        if (b != prior) any = 1'b1;
        line.push_back(e.dec ? prior : b);
        line.push_back(b);
      end
      prev_bit  = e.coded[0];
      e.held    = !any;
      e.rx_dec  = e.held ? prev_rx : e.dec;
      prev_rx   = e.rx_dec;
      e.rx_word = e.rx_dec ? (e.coded ^ inv_mask(wl)) : e.coded;
      info.push_back(e);
    end
    // after the last word the line keeps its value
    for (int n = 0; n < 4 * wl; n++) begin line.push_back(prev_bit); line.push_back(prev_bit); end
  endfunction

endpackage
