// tb_crossbar: checks that the crossbar lines up the bytes of the firing
// column, wrapping from column 15 to 0, clears the bytes past the length,
// and passes length and piece flags; and that it pushes nothing when no
// column fires.
module tb_crossbar;
  import rappid_pkg::*;
  logic [NCOL-1:0] fire, pc_prefix, pc_head, pc_tail;
  logic [NCOL-1:0][MAXLEN-1:0] len_onehot;
  logic [NCOL-1:0][7:0] lat_data;
  logic push;
  xb_entry_t entry;
  int checks = 0, failures = 0;

  crossbar u_dut (.fire, .len_onehot, .pc_prefix, .pc_head, .pc_tail, .lat_data, .push, .entry);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int c, l;
      xb_entry_t e;
      c = $urandom_range(0, NCOL - 1);
      l = $urandom_range(1, MAXLEN);
      for (int k = 0; k < NCOL; k++) begin
        lat_data[k]   = 8'($urandom);
        len_onehot[k] = 7'(1 << $urandom_range(0, MAXLEN - 1));
      end
      pc_prefix = 16'($urandom); pc_head = 16'($urandom); pc_tail = 16'($urandom);
      len_onehot[c] = 7'(1 << (l - 1));
      fire = (i % 10 == 9) ? '0 : 16'(1 << c);
      #1;
      e = '0;
      e.len = 3'(l);
      for (int k = 0; k < l; k++) e.bytes[k] = lat_data[(c + k) % NCOL];
      e.is_prefix = pc_prefix[c]; e.long_head = pc_head[c]; e.long_tail = pc_tail[c];
      checks++;
      if (fire == '0) begin
        if (push) begin failures++; $display("FAIL push without a firing column"); end
      end else if (!push || entry !== e) begin
        failures++;
        if (failures < 10) $display("FAIL col %0d len %0d: %h expected %h", c, l, entry, e);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
