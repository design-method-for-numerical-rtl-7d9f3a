7000b301c1fc830b8fc2d41
