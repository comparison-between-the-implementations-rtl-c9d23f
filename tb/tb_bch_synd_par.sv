// tb_bch_synd_par: checks the byte-parallel syndrome step for J = 1, 7 and 24
// against eight bit-serial Horner steps s <- s*alpha^J + bit (bit 7 first).
module tb_bch_synd_par;
  import bch_tb_pkg::*;

  logic [15:0] s_in;
  logic [7:0]  data;
  logic [15:0] s1, s7, s24;
  int checks = 0, failures = 0;

  bch_synd_par #(.J(1))  d1  (.s_in, .data, .s_out(s1));
  bch_synd_par #(.J(7))  d7  (.s_in, .data, .s_out(s7));
  bch_synd_par #(.J(24)) d24 (.s_in, .data, .s_out(s24));

  function automatic logic [15:0] horner(logic [15:0] s, logic [7:0] d, int j);
    for (int i = 7; i >= 0; i--) s = mul(s, apow(j)) ^ 16'(d[i]);
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int n = 0; n < 3000; n++) begin
      s_in = (n < 256) ? 16'h0 : 16'($urandom);
      data = (n < 256) ? 8'(n) : 8'($urandom);
      #1;
      checks += 3;
      if (s1  !== horner(s_in, data, 1))  begin failures++; $display("FAIL J=1 %h %h", s_in, data); end
      if (s7  !== horner(s_in, data, 7))  begin failures++; $display("FAIL J=7 %h %h", s_in, data); end
      if (s24 !== horner(s_in, data, 24)) begin failures++; $display("FAIL J=24 %h %h", s_in, data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
