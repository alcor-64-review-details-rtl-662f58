// tb_alcor_stim_pkg -- shared settings of the chip-level testbench: the
// conversion length of every TDC model and the pixel mode of every column.
// Column 5 has long conversions (so hits find their TDC busy), column 6 very
// short ones (so a flood fills the pixel buffers); the others are short
// enough that a low hit rate never loses anything. With fast set, every
// column gets the short conversions (used by the data-rate testbench).
package tb_alcor_stim_pkg;
  function automatic logic [8:0] tdc_dur(input int c, input int p, input int t,
                                         input bit fast = 1'b0);
    if (fast) return 9'(2 + (c * 7 + p * 3 + t) % 6);
    if (c == 5) return 9'(40 + p + 2 * t);
    if (c == 6) return 9'(2 + t % 2);
    return 9'(2 + (c * 7 + p * 3 + t) % 6);
  endfunction

  // column modes: 0 LE, 1 TOT, 2 TOT2, 3 SR
  function automatic logic [1:0] col_mode(input int c);
    case (c)
      2:       return 2'd1;
      3:       return 2'd2;
      4:       return 2'd3;
      default: return 2'd0;
    endcase
  endfunction
endpackage
