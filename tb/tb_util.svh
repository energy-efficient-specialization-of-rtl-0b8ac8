// Shared check helpers for the self-checking testbenches. Each testbench
// declares `int checks, failures;` and uses CHECK_EQ to compare a value from
// the design with one computed independently.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK_EQ(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp); \
    end \
  end
`endif
