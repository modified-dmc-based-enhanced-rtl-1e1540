// tb_dmc_corrector: self-checking test of the symbol bit-inversion stage.
// For each symbol alone and for random sets of marked symbols, each symbol of the
// output must equal the input symbol XOR its column's vertical syndrome when
// marked (symbols 0/4 with vsyn[3:0], 1/5 with [7:4], 2/6 with [11:8], 3/7 with
// [15:12]) and the input symbol otherwise. A watchdog ends the run after a fixed
// number of clock cycles.
module tb_dmc_corrector;
  import dmc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t   dm, dc;
  vcb_t    vs;
  errloc_t loc;
  int      checks = 0, failures = 0;

  dmc_corrector dut (.data_mem(dm), .vsyn(vs), .err_loc(loc), .data_corr(dc));

  function automatic data_t expected(data_t d, vcb_t v, errloc_t l);
    data_t e = d;
    for (int s = 0; s < 8; s++) begin
      logic [3:0] colsyn;
      case (s)
        0, 4:    colsyn = v[3:0];
        1, 5:    colsyn = v[7:4];
        2, 6:    colsyn = v[11:8];
        default: colsyn = v[15:12];
      endcase
      if (l[s]) e[4 * s +: 4] = d[4 * s +: 4] ^ colsyn;
    end
    return e;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      dm  = $urandom;
      vs  = 16'($urandom);
      loc = (i < 800) ? errloc_t'(1 << (i % 8)) : errloc_t'($urandom);
      @(posedge clk);
      checks++;
      if (dc !== expected(dm, vs, loc)) begin
        failures++;
        $display("FAIL d=%h vsyn=%h loc=%b out=%h exp %h", dm, vs, loc, dc, expected(dm, vs, loc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
