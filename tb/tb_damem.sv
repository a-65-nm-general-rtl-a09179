// tb_damem: writes vector registers lane by lane, reads them back against a reference model of
// the two-row layout, and checks the DNN DOUT products (stored bit AND row weight bit) for random
// weight patterns.
module tb_damem;
  import gpcim_pkg::*;
  logic clk = 1'b0;
  logic [3:0] raddr = '0, waddr = '0;
  vec_t rdata, wdata = '0;
  logic we = 1'b0;
  logic [LANES-1:0] lane_we = '0;
  logic [DA_ROWS-1:0] wl = '0;
  logic [DA_ROWS-1:0][DA_COLS-1:0] dout;
  vec_t model [DA_VREGS];
  int checks = 0, failures = 0;

  damem dut (.clk, .raddr, .rdata, .we, .waddr, .lane_we, .wdata, .wl_weight(wl), .dout);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DA_COLS-1:0] row_of(input int r);
    vec_t v = model[r/2];
    return (r % 2 == 0) ? {v[1], v[0]} : {v[3], v[2]};
  endfunction

  initial begin
    // fill every register
    for (int v = 0; v < DA_VREGS; v++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(v); lane_we = '1;
      for (int l = 0; l < LANES; l++) wdata[l] = $urandom;
      model[v] = wdata;
    end
    // partial-lane writes
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'($urandom); lane_we = 4'($urandom);
      for (int l = 0; l < LANES; l++) begin
        wdata[l] = $urandom;
        if (lane_we[l]) model[waddr][l] = wdata[l];
      end
    end
    @(negedge clk);
    we = 1'b0;
    for (int v = 0; v < DA_VREGS; v++) begin
      raddr = 4'(v);
      #1;
      checks++;
      if (rdata !== model[v]) begin
        failures++;
        $display("FAIL read v%0d got %h exp %h", v, rdata, model[v]);
      end
    end
    // DOUT products
    for (int t = 0; t < 20; t++) begin
      wl = $urandom;
      #1;
      for (int r = 0; r < DA_ROWS; r++) begin
        checks++;
        if (dout[r] !== (wl[r] ? row_of(r) : '0)) begin
          failures++;
          $display("FAIL dout row %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
