// tb_result_comparator -- random first/second outcomes, equal and with single
// or multiple bit differences in either word, with each compare enable; the
// fault output must be high exactly when an enabled word differs.
module tb_result_comparator;
  import ft_pkg::*;
  fu_res_t a, b; logic cv, ca, fault;
  int checks = 0, failures = 0;
  result_comparator dut (.first_i(a), .second_i(b), .cmp_value_i(cv), .cmp_aux_i(ca), .fault_o(fault));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      bit exp;
      a.value = {$urandom, $urandom}; a.aux = {$urandom, $urandom};
      b = a;
      case (n % 4)
        1: b.value[$urandom_range(63, 0)] ^= 1'b1;
        2: b.aux[$urandom_range(63, 0)] ^= 1'b1;
        3: begin b.value ^= {$urandom, $urandom}; b.aux ^= {$urandom, $urandom}; end
        default: ;
      endcase
      cv = 1'($urandom); ca = 1'($urandom);
      #1;
      exp = (cv && a.value != b.value) || (ca && a.aux != b.aux);
      checks++;
      if (fault !== exp) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
