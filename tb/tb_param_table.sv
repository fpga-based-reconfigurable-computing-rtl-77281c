// tb_param_table: writes random values to every field of every row over the
// control bus, plus writes to other regions and out-of-range rows that must
// be ignored, and reads every row back by asset index.
module tb_param_table;
  import heston_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0;
  ctrl_wr_t wr;
  logic [1:0] rd_asset;
  param_row_t rd_row;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [N][NUM_FIELDS];

  param_table #(.N(N)) dut (.clk(clk), .wr(wr), .rd_asset(rd_asset), .rd_row(rd_row));

  always #5 clk = ~clk;

  task automatic write(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    wr = '{we: 1'b0, addr: '0, data: '0};
  endtask

  // Field f of a row; the struct lists the fields in bus order, first field
  // in the most significant word.
  function automatic logic [31:0] field_of(param_row_t r, int f);
    logic [NUM_FIELDS*32-1:0] flat;
    flat = r;
    return flat[(NUM_FIELDS - 1 - f) * 32 +: 32];
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0;
    rd_asset = '0;
    @(posedge clk);
    for (int r = 0; r < N; r++)
      for (int f = 0; f < NUM_FIELDS; f++) begin
        ref_mem[r][f] = $urandom;
        write({4'd1, 8'(r), 4'(f)}, ref_mem[r][f]);
      end
    // must be ignored: correlation region, configuration region, row N
    write({4'd2, 8'd0, 4'd0}, 32'hDEAD_0001);
    write({4'd0, 8'd0, 4'd1}, 32'hDEAD_0002);
    write({4'd1, 8'(N), 4'd0}, 32'hDEAD_0003);
    write({4'd1, 8'(N + 4), 4'd3}, 32'hDEAD_0004);
    for (int rep = 0; rep < 3; rep++)
      for (int r = 0; r < N; r++) begin
        rd_asset = 2'(r);
        #1;
        for (int f = 0; f < NUM_FIELDS; f++) begin
          checks++;
          if (field_of(rd_row, f) !== ref_mem[r][f]) begin
            failures++;
            $display("row %0d field %0d: %h vs %h", r, f, field_of(rd_row, f), ref_mem[r][f]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
