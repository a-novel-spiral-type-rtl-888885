// tb_pe: self-checking test of one PE. Drives random neighbour values and
// modes and compares Cur, Ref and |Cur-Ref| with a reference model kept in
// the testbench.
module tb_pe;
  import me_pkg::*;

  logic clk = 1'b0;
  pe_mode_t mode;
  pix_t cur_t, rt, rb, rl, rr, cur_q, ref_q, ad;
  int checks = 0, failures = 0;
  pix_t m_cur, m_ref;

  pe dut (.clk, .mode, .cur_from_top(cur_t), .ref_from_top(rt), .ref_from_bottom(rb),
          .ref_from_left(rl), .ref_from_right(rr), .cur_q, .ref_q, .absdiff(ad));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // first cycle: load both registers
    mode = PE_LOAD; cur_t = 8'd10; rt = 8'd200; rb = 0; rl = 0; rr = 0;
    m_cur = 8'd10; m_ref = 8'd200;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      mode  = pe_mode_t'($urandom_range(0, 5));
      cur_t = pix_t'($urandom); rt = pix_t'($urandom); rb = pix_t'($urandom);
      rl = pix_t'($urandom); rr = pix_t'($urandom);
      @(posedge clk);
      case (mode)
        PE_LOAD:        begin m_cur = cur_t; m_ref = rt; end
        PE_FROM_TOP:    m_ref = rt;
        PE_FROM_BOTTOM: m_ref = rb;
        PE_FROM_LEFT:   m_ref = rl;
        PE_FROM_RIGHT:  m_ref = rr;
        default: ;
      endcase
      #1;
      checks++;
      if (cur_q !== m_cur || ref_q !== m_ref ||
          int'(ad) != ((int'(m_cur) > int'(m_ref)) ? int'(m_cur) - int'(m_ref) : int'(m_ref) - int'(m_cur))) begin
        failures++;
        if (failures < 10) $display("mismatch mode=%0d cur=%0d/%0d ref=%0d/%0d ad=%0d",
                                    mode, cur_q, m_cur, ref_q, m_ref, ad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
