// tb_util.svh: shared testbench helpers.
//   `TB_CHECK(cond, msg)  counts one check, and a failure with a message if
//                         cond is false (expects ints checks and failures).
//   `TB_FINISH            prints the result line and ends the simulation.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
