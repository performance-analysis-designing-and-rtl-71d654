// march_ref_pkg: reference model of the eight March algorithms for the
// testbenches.
//
// Each algorithm is written as text in the usual March notation, one element
// per ';'-separated field: "U" or "D" for the addressing order, followed by
// the operations r0, r1, w0, w1. The text is parsed at run time into a list of
// operations, so the expected behaviour does not come from the microcode ROM
// of the design. The algorithm number is the 3-bit selection code.
package march_ref_pkg;

  typedef struct {
    bit up;         // element walks the addresses upward
    bit wr;         // write (1) or read (0)
    bit d;          // data background
    bit elem_last;  // last operation of its element
    bit alg_last;   // part of the last element
  } ref_op_t;

  // Operations per word of each algorithm, counted by hand from the table.
  function automatic int ops_per_word(int a);
    case (a)
      0: return 5;   1: return 6;   2: return 10;  3: return 15;
      4: return 17;  5: return 13;  6: return 14;  7: return 22;
      default: return 0;
    endcase
  endfunction

  function automatic string alg_name(int a);
    case (a)
      0: return "MATS+";    1: return "March X";  2: return "March C-";
      3: return "March A";  4: return "March B";  5: return "March U";
      6: return "March LR"; 7: return "March SS";
      default: return "?";
    endcase
  endfunction

  function automatic string alg_text(int a);
    case (a)
      0: return "U w0; U r0 w1; D r1 w0";
      1: return "U w0; U r0 w1; D r1 w0; U r0";
      2: return "U w0; U r0 w1; D r1 w0; U r0 w1; D r1 w0; U r0";
      3: return "U w0; U r0 w1 w0 w1; U r1 w0 w1; D r1 w0 w1 w0; D r0 w1 w0";
      4: return "U w0; U r0 w1 r1 w0 r0 w1; U r1 w0 w1; D r1 w0 w1 w0; D r0 w1 w0";
      5: return "U w0; U r0 w1 r1 w0; U r0 w1; D r1 w0 r0 w1; D r1 w0";
      6: return "U w0; D r0 w1; U r1 w0 r0 w1; U r1 w0; U r0 w1 r1 w0; U r0";
      7: return "U w0; U r0 r0 w0 r0 w1; U r1 r1 w1 r1 w0; D r0 r0 w0 r0 w1; D r1 r1 w1 r1 w0; U r0";
      default: return "";
    endcase
  endfunction

  // Parse algorithm a into ops; first[e] is the index of element e's first op.
  function automatic void parse(int a, ref ref_op_t ops[$], ref int first[$]);
    string   s;
    bit      up;
    ref_op_t op;
    s = alg_text(a);
    ops.delete();
    first.delete();
    up = 1'b1;
    for (int i = 0; i < s.len(); i++) begin
      byte c;
      c = s[i];
      if (c == "U" || c == "D") begin
        up = (c == "U");
        first.push_back(ops.size());
      end else if (c == "r" || c == "w") begin
        op.up        = up;
        op.wr        = (c == "w");
        op.d         = (s[i+1] == "1");
        op.elem_last = 1'b0;
        op.alg_last  = 1'b0;
        ops.push_back(op);
        i++;
      end else if (c == ";") begin
        ops[ops.size()-1].elem_last = 1'b1;
      end
    end
    ops[ops.size()-1].elem_last = 1'b1;
    for (int k = first[first.size()-1]; k < ops.size(); k++) ops[k].alg_last = 1'b1;
  endfunction

endpackage
