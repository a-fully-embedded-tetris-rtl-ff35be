// row_clear_tb: fields with none, one or several full rows at random places; checks the
// full-row flag, the index of the lowest full row and the field after deleting it
// against the reference.
module row_clear_tb;
  import tetris_pkg::*;
  import tetris_ref_pkg::*;

  field_t     field, field_out;
  logic       any_full;
  logic [4:0] full_row;
  int checks = 0, failures = 0, n_full = 0, n_multi = 0;

  row_clear dut (.field (field), .any_full (any_full), .full_row (full_row),
                 .field_out (field_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_field_t f, g;
    bit has;
    int lowest;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 20; i++) begin
        f[i] = 10'($urandom());
        if ($urandom_range(0, 5) == 0) f[i] = 10'h3FF;
      end
      field = field_t'(f);
      #1;
      has = ref_clear(f, g);
      lowest = -1;
      for (int i = 0; i < 20; i++) if (f[i] == 10'h3FF) lowest = i;
      if (has) n_full++;
      if (ref_full_rows(f) > 1) n_multi++;
      checks++;
      if (any_full !== has) begin
        failures++;
        $display("FAIL any_full %0b", any_full);
      end
      checks++;
      if (has && int'(full_row) != lowest) begin
        failures++;
        $display("FAIL full_row %0d expected %0d", full_row, lowest);
      end
      checks++;
      if (field_out !== field_t'(g)) begin
        failures++;
        $display("FAIL field_out after deleting row %0d", lowest);
      end
    end
    checks++;
    if (n_full < 100 || n_multi < 100) begin
      failures++;
      $display("FAIL coverage full=%0d multi=%0d", n_full, n_multi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
