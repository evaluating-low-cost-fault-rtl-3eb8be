// result_comparator -- the checker of the time-redundant execution.
//
// Compares the outcome an instruction produced the first time it executed
// (held in its RUU entry) with the outcome of its reissued execution. An
// outcome has two words: the register/store-data value and the auxiliary word
// (memory address of a load or store, next PC of a control instruction).
// cmp_value_i selects whether the value word takes part; it is cleared for a
// load whose memory access is not repeated, where only the address is
// recomputed. fault_o is high when the compared words differ. Combinational.
// The checker is assumed free of faults itself (hardened cells or triplication
// would make it so); this module does not model that protection.
module result_comparator
  import ft_pkg::*;
(
  input  fu_res_t first_i,
  input  fu_res_t second_i,
  input  logic    cmp_value_i,
  input  logic    cmp_aux_i,
  output logic    fault_o
);
  always_comb begin
    fault_o = 1'b0;
    if (cmp_value_i && (first_i.value != second_i.value)) fault_o = 1'b1;
    if (cmp_aux_i   && (first_i.aux   != second_i.aux))   fault_o = 1'b1;
  end
endmodule
