// tb_translator_stream: a long randomised text (sentences built from a word
// list with random case, punctuation and line ends) is streamed through the
// translator, and the Braille output is compared with a reference model in
// this testbench: a plain sequential search over the rule table for each
// position of the whole text.  The output is drained with a random ready.
module tb_translator_stream;
  import braille_pkg::*;
  localparam int unsigned N_WORDS = 400;
  logic clk = 0, rst_n = 1, in_valid = 0, out_ready = 0;
  char_t in_data = 0;
  logic out_valid, busy, in_overflow, out_overflow;
  char_t out_data;
  int checks = 0, failures = 0, n_ovf = 0;
  string got;

  translator dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) got = {got, string'(out_data)};
    if (in_overflow || out_overflow) n_ovf++;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic letter(byte c);
    return c >= "A" && c <= "Z";
  endfunction

  function automatic logic cls(byte p, byte c);
    if (p == "~") return !letter(c);
    if (p == "!") return letter(c);
    return p == c;
  endfunction

  // Reference: for each position try every rule in table order whose focus
  // starts with the character; the first full match wins, else copy.
  function automatic string reference(string t);
    rule_table_t rt;
    string r;
    int p;
    rt = build_rules();
    r = "";
    p = 0;
    while (p < t.len()) begin
      int hit;
      hit = -1;
      for (int k = 0; k < NUM_RULES && hit < 0; k++) begin
        logic ok;
        int fl;
        fl = int'(rt[k].focus_len);
        if (fl == 0 || rt[k].focus[0] != t[p]) continue;
        ok = 1;
        for (int i = 0; i < fl; i++)
          if (p + i >= t.len() || t[p+i] != rt[k].focus[i]) ok = 0;
        for (int i = 0; i < int'(rt[k].right_len); i++)
          if (!cls(rt[k].right[i], (p + fl + i < t.len()) ? t[p+fl+i] : " ")) ok = 0;
        for (int i = 0; i < int'(rt[k].left_len); i++)
          if (!cls(rt[k].left[i], (p - 1 - i >= 0) ? t[p-1-i] : " ")) ok = 0;
        if (ok) hit = k;
      end
      if (hit < 0) begin
        r = {r, string'(t[p])};
        p++;
      end else begin
        for (int i = 0; i < int'(rt[hit].out_len); i++) r = {r, string'(rt[hit].out[i])};
        p += int'(rt[hit].focus_len);
      end
    end
    return r;
  endfunction

  initial begin
    string words[$];
    string text, upper;
    words = '{"the", "and", "for", "of", "with", "but", "can", "do", "every", "from",
              "go", "have", "it", "just", "like", "more", "not", "people", "quite",
              "rather", "so", "that", "us", "very", "will", "you", "as", "child",
              "should", "thinking", "weather", "outward", "read", "rabbit", "coffee",
              "egg", "shower", "ghost", "stand", "narrow", "edge", "xylophone",
              "zebra", "them", "there", "during", "sing", "bring", "ear", "sea",
              "42", "1829", "a", "i"};
    text = "";
    for (int w = 0; w < N_WORDS; w++) begin
      string x;
      x = words[$urandom % words.size()];
      if (($urandom % 5) == 0) x = x.toupper();
      text = {text, x};
      case ($urandom % 12)
        0: text = {text, ". "};
        1: text = {text, ", "};
        2: text = {text, "\n"};
        default: text = {text, " "};
      endcase
    end
    text = {text, "\n"};
    upper = text.toupper();
    got = "";
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < text.len(); i++) begin
      @(negedge clk); in_valid = 1; in_data = text[i];
      @(negedge clk); in_valid = 0;
      repeat (1000) @(negedge clk);   // a group is translated and sent before the next can close
    end
    repeat (2000) @(negedge clk);
    begin
      string exp;
      exp = reference(upper);
      checks++;
      if (got != exp) begin
        failures++;
        $display("mismatch: %0d codes received, %0d expected", got.len(), exp.len());
        for (int i = 0; i < got.len() && i < exp.len(); i++)
          if (got[i] != exp[i]) begin
            $display("first difference at %0d: '%s' vs '%s'", i, got.substr(i, i + 20), exp.substr(i, i + 20));
            break;
          end
      end
      checks++;
      if (n_ovf != 0) begin failures++; $display("%0d overflows", n_ovf); end
      $display("%0d text characters, %0d Braille codes", text.len(), got.len());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
