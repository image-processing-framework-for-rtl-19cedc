// fdso: file data source. Behavioural simulation model, not synthesizable:
// it turns a file of comma separated values into a framework stream, as the
// stimulus of a module under test.
//
// The file named by FILE holds decimal integers separated by commas, blanks
// or line breaks (a comma separated file; negative values allowed). After
// reset the model sends one value per stream word, in file order, with GAP
// idle cycles between words; out_data takes the value's low DW bits. When the
// file is exhausted, done rises and stays high. A file that cannot be opened
// is reported and gives done at once.
// The document describes the function (file to stream, for verification);
// the file format details, GAP and done are this model's choices.
module fdso #(
  parameter string       FILE = "tb/fdso_stimuli.dat",
  parameter int unsigned DW   = 8,
  parameter int unsigned GAP  = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  output logic          done
);
  int fd = 0;
  int ch;
  logic [63:0] acc;
  bit          have, neg;

  // next value from the file; returns 0 at the end of the file
  function automatic bit next_value(output logic [63:0] v);
    have = 0; neg = 0; acc = '0;
    forever begin
      ch = $fgetc(fd);
      if (ch >= "0" && ch <= "9") begin
        acc  = acc * 10 + 64'(ch - "0");
        have = 1;
      end else if (ch == "-" && !have) begin
        neg = 1;
      end else if (have || ch == -1) begin
        v = neg ? -acc : acc;
        return have;
      end
    end
  endfunction

  initial begin
    logic [63:0] v;
    out_valid = 1'b0;
    out_data  = '0;
    done      = 1'b0;
    fd = $fopen(FILE, "r");
    if (fd == 0) $display("fdso: cannot open %s", FILE);
    wait (rst_n);
    @(posedge clk);
    while (fd != 0 && next_value(v)) begin
      out_valid <= 1'b1;
      out_data  <= v[DW-1:0];
      @(posedge clk);
      out_valid <= 1'b0;
      repeat (GAP) @(posedge clk);
    end
    if (fd != 0) $fclose(fd);
    done <= 1'b1;
  end

endmodule
