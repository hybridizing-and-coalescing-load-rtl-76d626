// lvp_ref_pkg: a plain, untimed reference model of one predictor bank of the
// St+Reg+L3pV coalesced hybrid, for the testbenches.  It executes
// predictions and updates one at a time, in the order the hardware accepts
// them, and is written from the rules rather than from the RTL structure:
// per line a partial tag, a miss bit, one outcome history per component,
// the last value and the partial values; per component a table of
// saturating counters indexed by the history.
package lvp_ref_pkg;

  class lvp_ref;
    int unsigned lines, bank_bits, tag_w, hist_w, npv, pval_w;
    int unsigned cnt_top, cnt_thr, cnt_pen, comp_en, ncomp;
    longint unsigned pmask;
    longint unsigned last[];
    longint unsigned pval[][];
    int unsigned     tag[];
    bit              miss[];
    int unsigned     hist[][];
    int unsigned     cnt[][];

    function new(int unsigned lines_, int unsigned bank_bits_, int unsigned tag_w_,
                 int unsigned hist_w_, int unsigned npv_, int unsigned pval_w_,
                 int unsigned top_, int unsigned thr_, int unsigned pen_,
                 int unsigned comp_en_);
      lines = lines_; bank_bits = bank_bits_; tag_w = tag_w_; hist_w = hist_w_;
      npv = npv_; pval_w = pval_w_; cnt_top = top_; cnt_thr = thr_; cnt_pen = pen_;
      comp_en = comp_en_;
      ncomp = 3 + npv;
      pmask = (64'd1 << pval_w) - 1;
      last = new[lines]; pval = new[lines]; tag = new[lines]; miss = new[lines];
      hist = new[lines];
      foreach (pval[i]) begin
        pval[i] = new[npv];
        hist[i] = new[ncomp];
        last[i] = 0; tag[i] = 0; miss[i] = 0;
        foreach (pval[i][p]) pval[i][p] = 0;
        foreach (hist[i][c]) hist[i][c] = 0;
      end
      cnt = new[ncomp];
      foreach (cnt[c]) begin
        cnt[c] = new[1 << hist_w];
        foreach (cnt[c][h]) cnt[c][h] = 0;
      end
    endfunction

    function int unsigned idx_of(longint unsigned pc);
      return int'((pc >> (2 + bank_bits)) % lines);
    endfunction

    function int unsigned tag_of(longint unsigned pc);
      return int'((pc >> (2 + bank_bits + $clog2(lines))) & ((1 << tag_w) - 1));
    endfunction

    // value predicted by component c of line i
    function longint unsigned value_of(int unsigned i, int unsigned c, longint unsigned reg_val);
      longint unsigned second;
      second = (last[i] & ~pmask) | pval[i][0];
      case (c)
        0: return last[i] + (last[i] - second);
        1: return reg_val;
        2: return last[i];
        default: return (last[i] & ~pmask) | pval[i][c - 3];
      endcase
    endfunction

    function void predict(longint unsigned pc, longint unsigned reg_val,
                          output bit pred, output longint unsigned val,
                          output int unsigned comp, output int unsigned conf);
      int unsigned i = idx_of(pc);
      bit found = 0;
      comp = 0; conf = 0;
      for (int unsigned c = 0; c < ncomp; c++) begin
        int unsigned k = cnt[c][hist[i][c]];
        if (comp_en[c] && (!found || k > conf)) begin
          found = 1; comp = c; conf = k;
        end
      end
      val  = value_of(i, comp, reg_val);
      pred = found && (tag[i] == tag_of(pc)) && (conf >= cnt_thr);
    endfunction

    // returns 0 for a tag hit, 1 for a first miss, 2 for a take-over
    function int update(longint unsigned pc, longint unsigned value, longint unsigned reg_val);
      int unsigned i = idx_of(pc);
      int kind;
      if (tag[i] == tag_of(pc)) kind = 0;
      else if (!miss[i]) kind = 1;
      else kind = 2;
      if (kind == 1) begin
        miss[i] = 1;
        return kind;
      end
      for (int unsigned c = 0; c < ncomp; c++) begin
        bit ok = (value_of(i, c, reg_val) == value);
        int unsigned h = hist[i][c];
        if (ok) cnt[c][h] = (cnt[c][h] >= cnt_top) ? cnt_top : cnt[c][h] + 1;
        else    cnt[c][h] = (cnt[c][h] <= cnt_pen) ? 0 : cnt[c][h] - cnt_pen;
        hist[i][c] = (int'(ok) << (hist_w - 1)) | (h >> 1);
      end
      for (int p = int'(npv) - 1; p > 0; p--) pval[i][p] = pval[i][p-1];
      pval[i][0] = last[i] & pmask;
      last[i] = value;
      tag[i]  = tag_of(pc);
      miss[i] = 0;
      return kind;
    endfunction
  endclass

  // A synthetic load site: a PC and a value sequence of one kind.
  //   0 constant, 1 stride, 2 cycle of three values, 3 random values that the
  //   destination register already holds, 4 random, 5 two alternating values.
  class load_site;
    longint unsigned pc;
    int              kind;
    longint unsigned base, stride, n;
    longint unsigned alt[3];

    function new(longint unsigned pc_, int kind_);
      pc = pc_; kind = kind_; n = 0;
      base   = {$urandom, $urandom};
      stride = longint'($urandom_range(1, 40)) * 8;
      // the cycle values share their upper 48 bits, as partial values need
      alt[0] = base;
      alt[1] = {base[63:16], base[15:0] ^ 16'h0038};
      alt[2] = {base[63:16], 16'h0F0F};
    endfunction

    // value of the next execution and the destination register's content
    function void next(output longint unsigned value, output longint unsigned reg_val);
      case (kind)
        0: value = base;
        1: value = base + n * stride;
        2: value = alt[n % 3];
        5: value = alt[n % 2];
        default: value = {$urandom, $urandom};
      endcase
      reg_val = (kind == 3) ? value : {$urandom, $urandom};
      n++;
    endfunction
  endclass

endpackage
