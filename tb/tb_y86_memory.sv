// tb_y86_memory: exercises the three memory ports on a 256-byte memory.
// Host writes fill it with random bytes (kept in a model array); then random
// 32-bit data writes at unaligned addresses, data reads, 7-byte instruction
// reads and host reads are compared with the model, including the error flags
// and zero bytes past the end, and a write that must be refused.
module tb_y86_memory;
  import y86_pkg::*;

  localparam int MB = 256;

  logic        clk = 1'b0;
  word_t       ipc, daddr, dwdata, drdata, haddr;
  logic [55:0] ibytes;
  logic        imem_error, dre, dwe, dmem_error, hwe;
  logic [7:0]  hwdata, hrdata;
  logic [7:0]  model [MB];
  int          checks = 0, failures = 0;

  y86_memory #(.MEM_BYTES(MB), .IBYTES(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mb(word_t a);
    return (a < MB) ? model[a] : 8'h00;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ipc = 0; daddr = 0; dwdata = 0; dre = 1'b0; dwe = 1'b0; hwe = 1'b0; haddr = 0; hwdata = 0;
    @(negedge clk);
    for (int a = 0; a < MB; a++) begin
      haddr = a; hwdata = 8'($urandom); hwe = 1'b1; model[a] = hwdata;
      @(negedge clk);
    end
    hwe = 1'b0;
    for (int a = 0; a < MB; a++) begin
      haddr = a; #1;
      check($sformatf("host read after fill %0d", a), hrdata === model[a]);
    end
    for (int t = 0; t < 1500; t++) begin
      word_t a;
      @(negedge clk);  // change inputs away from the writing clock edge
      a = $urandom_range(0, MB + 8);
      case ($urandom_range(0, 3))
        0: begin  // data write
          daddr = a; dwdata = $urandom; dwe = 1'b1; #1;
          check("write error flag", dmem_error === (a > MB - 4));
          @(negedge clk);
          if (a <= MB - 4) for (int i = 0; i < 4; i++) model[a+i] = dwdata[8*i +: 8];
          dwe = 1'b0;
        end
        1: begin  // data read
          daddr = a; dre = 1'b1; #1;
          check("data read", drdata === {mb(a+3), mb(a+2), mb(a+1), mb(a)});
          check("read error flag", dmem_error === (a > MB - 4));
          dre = 1'b0; #1;
          check("read disabled gives zero", drdata === 0);
        end
        2: begin  // instruction read
          logic [55:0] e;
          ipc = a; #1;
          for (int i = 0; i < 7; i++) e[8*i +: 8] = mb(a + i);
          check("instruction bytes", ibytes === e);
          check("instruction error flag", imem_error === (a >= MB));
        end
        default: begin  // host read
          haddr = a; #1;
          check($sformatf("host read %0d: %h exp %h", a, hrdata, mb(a)), hrdata === mb(a));
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
