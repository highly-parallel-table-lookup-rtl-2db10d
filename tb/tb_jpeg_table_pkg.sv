// tb_jpeg_table_pkg: a JPEG-style AC Huffman table for the coder testbenches.
//
// Symbols: the 162 JPEG AC run/size values - EOB 0x00, ZRL 0xF0 and 0xRS for
// run R = 0..15, size S = 1..10. Code: canonical Huffman code with the JPEG
// luminance AC number of codes per length (0,2,1,3,3,2,4,3,5,5,4,4,0,0,1,125
// codes of length 1..16); symbols with smaller run+size get shorter codes
// (this assignment is the testbench's own, not the standard's).
// FMCAM layout: the symbols in ascending order are cut into categories of
// PER_CAT = 11; category k is bank k, words 0..10; bound[k] is the category's
// smallest symbol. Words a search can visit but that hold no symbol get a value
// outside the bank's range, so they never match.
package tb_jpeg_table_pkg;
  localparam int unsigned C = 16, D = 32, WORDS = 16, CODE_W = 16;
  localparam int unsigned NSYM = 162, PER_CAT = 11;

  logic [7:0] syms [NSYM];                  // ascending symbol values
  logic [CODE_W-1:0] code_of [256];         // indexed by symbol value
  int len_of [256];
  bit in_table [256];
  logic [D-1:0] table_mem [C][WORDS];       // FMCAM contents
  logic [D-1:0] mbounds [C];

  function automatic void build_table();
    int bits [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 125};
    logic [7:0] order [NSYM];
    int n = 0, code = 0, idx = 0;
    for (int v = 0; v < 256; v++) in_table[v] = (v == 0) || (v == 'hF0) || ((v & 15) >= 1 && (v & 15) <= 10);
    for (int v = 0; v < 256; v++) if (in_table[v]) syms[n++] = 8'(v);
    // code assignment order: by run + size, then by value
    n = 0;
    for (int key = 0; key <= 30; key++)
      for (int v = 0; v < 256; v++)
        if (in_table[v] && ((v >> 4) + (v & 15)) == key) order[n++] = 8'(v);
    for (int l = 1; l <= 16; l++) begin
      for (int j = 0; j < bits[l-1]; j++) begin
        code_of[order[idx]] = CODE_W'(code);
        len_of[order[idx]] = l;
        idx++;
        code++;
      end
      code = code << 1;
    end
    for (int k = 0; k < int'(C); k++)
      for (int w = 0; w < int'(WORDS); w++) begin
        int s = k * PER_CAT + w;
        if (w < int'(PER_CAT) && s < int'(NSYM)) table_mem[k][w] = D'(syms[s]);
        else if (k == int'(C) - 1) table_mem[k][w] = 32'hFFFF_FFFE;   // below its own range
        else table_mem[k][w] = 32'hFFFF_FFFF;                       // above its own range
      end
    for (int k = 0; k < int'(C); k++)
      mbounds[k] = (k == 0) ? '0 : (k * PER_CAT < NSYM) ? D'(syms[k * PER_CAT]) : 32'hFFFF_FFFF;
  endfunction


  // draws a symbol with probability 2^-length, as a stream of random bits
  // decoded with the code would give
  function automatic logic [7:0] draw_symbol();
    forever begin
      logic [15:0] r = 16'($urandom);
      for (int i = 0; i < int'(NSYM); i++) begin
        int l = len_of[syms[i]];
        if ((r >> (16 - l)) == 16'(code_of[syms[i]])) return syms[i];
      end
    end
  endfunction

  // a symbol stream shared by several testbench instances
  localparam int unsigned MAX_STREAM = 4096;
  logic [7:0] stream [MAX_STREAM];
  int stream_len = 0;

  function automatic void make_stream(int n);
    stream_len = n;
    for (int i = 0; i < n; i++) stream[i] = draw_symbol();
  endfunction
endpackage
