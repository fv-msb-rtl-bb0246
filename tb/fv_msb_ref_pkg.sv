// fv_msb_ref_pkg: reference models for the FV-MSB codec testbenches.
//
// lru_ref models an LRU codebook as a recency list of entry numbers (front =
// most recently used) instead of the age counters of the RTL, so the two
// are written independently. Its initial order is entry 0 first, which is
// the order the RTL's reset ages give. fv_msb_ref encodes a word the way the
// sender must and returns the expected bus code, control bit and case.
package fv_msb_ref_pkg;

  class lru_ref;
    int unsigned n;
    int unsigned width;
    logic [31:0] data[];
    bit          valid[];
    int unsigned order[$];
    int unsigned evictions;

    function new(int unsigned entries, int unsigned w);
      n = entries;
      width = w;
      data = new[n];
      valid = new[n];
      order = {};
      for (int unsigned i = 0; i < n; i++) begin
        data[i] = '0;
        valid[i] = 0;
        order.push_back(i);
      end
      evictions = 0;
    endfunction

    function logic [31:0] mask(logic [31:0] v);
      return (width >= 32) ? v : (v & ((32'd1 << width) - 1));
    endfunction

    // Entry holding key, or -1.
    function int find(logic [31:0] key);
      for (int unsigned i = 0; i < n; i++)
        if (valid[i] && data[i] == mask(key)) return int'(i);
      return -1;
    endfunction

    function void touch(int unsigned e);
      foreach (order[k])
        if (order[k] == e) begin
          order.delete(k);
          break;
        end
      order.push_front(e);
    endfunction

    // Apply one lookup of key; returns the entry hit or filled.
    function int unsigned update(logic [31:0] key);
      int h;
      int unsigned v;
      h = find(key);
      if (h >= 0) begin
        touch(h);
        return h;
      end
      v = order[$];
      if (valid[v]) evictions++;
      data[v] = mask(key);
      valid[v] = 1;
      touch(v);
      return v;
    endfunction
  endclass

  // Case codes, numerically equal to the RTL enum values.
  localparam int KIND_RAW = 0;
  localparam int KIND_MSB = 1;
  localparam int KIND_FV  = 2;

  class fv_msb_ref;
    int unsigned w;
    int unsigned m;
    lru_ref fv;
    lru_ref msb;

    function new(int unsigned bus_w, int unsigned msb_bits);
      w = bus_w;
      m = msb_bits;
      fv = new(bus_w, bus_w);
      msb = new(msb_bits, msb_bits);
    endfunction

    // Encode one word; with commit set, also update both codebooks.
    function void encode(input logic [31:0] value, output logic [31:0] code,
                         output bit ctrl, output int kind, input bit commit = 1);
      int fh, mh;
      logic [31:0] hi, lo;
      hi = value >> (w - m);
      lo = value & ((32'd1 << (w - m)) - 1);
      fh = fv.find(value);
      mh = msb.find(hi);
      if (fh >= 0) begin
        code = 32'd1 << (w - 1 - fh);
        ctrl = 1;
        kind = KIND_FV;
      end else if (mh >= 0 && lo != 0) begin
        code = (32'd1 << (w - 1 - mh)) | lo;
        ctrl = 1;
        kind = KIND_MSB;
      end else begin
        code = value;
        ctrl = 0;
        kind = KIND_RAW;
      end
      if (commit) begin
        void'(fv.update(value));
        void'(msb.update(hi));
      end
    endfunction
  endclass

  // Word stream resembling data-bus traffic: a few recurring values, small
  // integers, pointers into a handful of heap regions (shared upper bits,
  // changing low bits), region bases with all-zero low bits, raw one-hot
  // words and fully random words.
  class stim_gen;
    int unsigned w;
    int unsigned m;
    logic [31:0] freq[8];
    logic [31:0] region[6];

    function new(int unsigned bus_w, int unsigned msb_bits);
      w = bus_w;
      m = msb_bits;
      foreach (freq[i]) freq[i] = $urandom_range(0, 15) == 0 ? 32'(i) : $urandom;
      foreach (region[i]) region[i] = $urandom;
    endfunction

    function logic [31:0] fit(logic [31:0] v);
      return (w >= 32) ? v : (v & ((32'd1 << w) - 1));
    endfunction

    function logic [31:0] next();
      int unsigned sel;
      logic [31:0] lomask;
      lomask = (32'd1 << (w - m)) - 1;
      sel = $urandom_range(0, 99);
      if (sel < 30)      return fit(freq[$urandom_range(0, 7)]);
      else if (sel < 45) return fit($urandom_range(0, 80));
      else if (sel < 75) return fit((region[$urandom_range(0, 5)] & ~lomask) | ($urandom & lomask & ~32'd7));
      else if (sel < 80) return fit(region[$urandom_range(0, 5)] & ~lomask);
      else if (sel < 85) return fit(32'd1 << $urandom_range(0, w - 1));
      else               return fit($urandom);
    endfunction
  endclass

endpackage
