// bisr_tb_pkg: reference model for the BISR testbenches.
//
// A March algorithm is described here as a list of elements (address order
// and up to five read/write operations), independently of the microcode.
// march_run() plays it on a model of a faulty memory (stuck-at bits per word)
// and returns the sequence of faulty read addresses, in the order a BIST
// reports them, and the number of clocks the BISR controller needs: 1 to
// start, 5 per write, 7 per read, 2 more per fault for the repair analysis
// handshake and 3 to fetch and decode the end word. microcode() encodes a
// March description into 7-bit words {valid, Fo, Io, Lo, I/D, R/W, data}.
package bisr_tb_pkg;

  typedef struct {
    bit down;         // 1 = decreasing addresses
    int nops;         // 1..5
    bit wr   [5];     // 1 = write
    bit data [5];     // 1 = all ones
  } elem_t;

  typedef elem_t march_t [$];

  typedef struct {
    int addr;
    logic [7:0] mask;
    logic [7:0] val;
  } fault_t;

  function automatic elem_t el(bit down, string ops);
    // ops like "r0r0w0r0w1"
    elem_t e;
    e.down = down;
    e.nops = ops.len() / 2;
    for (int i = 0; i < e.nops; i++) begin
      e.wr[i]   = (ops[2*i] == "w");
      e.data[i] = (ops[2*i+1] == "1");
    end
    return e;
  endfunction

  function automatic march_t march_ss();
    march_t m;
    m.push_back(el(0, "w0"));
    m.push_back(el(0, "r0r0w0r0w1"));
    m.push_back(el(0, "r1r1w1r1w0"));
    m.push_back(el(1, "r0r0w0r0w1"));
    m.push_back(el(1, "r1r1w1r1w0"));
    m.push_back(el(1, "r0"));
    return m;
  endfunction

  function automatic march_t march_c_minus();
    march_t m;
    m.push_back(el(0, "w0"));
    m.push_back(el(0, "r0w1"));
    m.push_back(el(0, "r1w0"));
    m.push_back(el(1, "r0w1"));
    m.push_back(el(1, "r1w0"));
    m.push_back(el(1, "r0"));
    return m;
  endfunction

  typedef logic [6:0] imem_words_t [32];

  function automatic imem_words_t microcode(march_t m);
    imem_words_t w;
    int k = 0;
    foreach (w[i]) w[i] = '0;
    foreach (m[j]) for (int i = 0; i < m[j].nops; i++) begin
      bit fo, io, lo;
      fo = (m[j].nops > 1) && (i == 0);
      lo = (m[j].nops > 1) && (i == m[j].nops - 1);
      io = (m[j].nops > 1) && !fo && !lo;
      w[k++] = {1'b1, fo, io, lo, m[j].down, m[j].wr[i], m[j].data[i]};
    end
    return w;   // word k stays 0: end of test
  endfunction

  function automatic logic [7:0] faulty_read(fault_t f [$], int a, logic [7:0] v);
    foreach (f[i]) if (f[i].addr == a) v = (v & ~f[i].mask) | (f[i].val & f[i].mask);
    return v;
  endfunction

  // Plays the March test; returns clocks from start to test_done.
  function automatic int march_run(march_t m, fault_t f [$], int words, ref int fault_addrs [$]);
    logic [7:0] mem [];
    int clocks = 1;
    mem = new[words];
    fault_addrs.delete();
    foreach (mem[i]) mem[i] = 8'h5C;
    foreach (m[j]) for (int s = 0; s < words; s++) begin
      int a = m[j].down ? words - 1 - s : s;
      for (int i = 0; i < m[j].nops; i++) begin
        logic [7:0] d = m[j].data[i] ? 8'hFF : 8'h00;
        if (m[j].wr[i]) begin
          mem[a] = d; clocks += 5;
        end else begin
          clocks += 7;
          if (faulty_read(f, a, mem[a]) != d) begin
            fault_addrs.push_back(a); clocks += 2;
          end
        end
      end
    end
    return clocks + 3;
  endfunction

endpackage
